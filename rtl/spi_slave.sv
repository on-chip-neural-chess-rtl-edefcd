// SPI slave (mode 0, MSB first) of the TPU FPGA, clocked by the TPU's own clock.
//
// SCLK, MOSI and CS_N pass through two-flop synchronisers; edges of the synchronised
// SCLK drive the shifting, so the TPU clock must be at least four times SCLK. sel
// pulses when CS_N falls; from then on tx_byte is taken at the start of every byte
// (at the falling CS_N edge for byte 0, at the first falling SCLK edge after a byte
// for the next) and shifted out on MISO. rx_valid pulses with rx_byte after the eighth
// rising edge of a byte. MISO is driven low while CS_N is high.
// The mode, synchronisers and byte handshake are this design's choices.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       mosi,
  input  logic       cs_n,
  output logic       miso,
  input  logic [7:0] tx_byte,
  output logic       sel,
  output logic [7:0] rx_byte,
  output logic       rx_valid
);

  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic [7:0] sh_rx, sh_tx;
  logic [2:0] bitn;
  logic       reload;

  wire sclk_rise = sclk_s[1] & ~sclk_s[2];
  wire sclk_fall = ~sclk_s[1] & sclk_s[2];
  wire cs_fall   = ~cs_s[1] & cs_s[2];
  wire active    = ~cs_s[1];

  assign miso = active & sh_tx[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s   <= '0;
      cs_s     <= '1;
      mosi_s   <= '0;
      sh_rx    <= '0;
      sh_tx    <= '0;
      bitn     <= '0;
      reload   <= 1'b0;
      sel      <= 1'b0;
      rx_byte  <= '0;
      rx_valid <= 1'b0;
    end else begin
      sclk_s   <= {sclk_s[1:0], sclk};
      cs_s     <= {cs_s[1:0], cs_n};
      mosi_s   <= {mosi_s[0], mosi};
      sel      <= 1'b0;
      rx_valid <= 1'b0;
      if (cs_fall) begin
        sel    <= 1'b1;
        bitn   <= '0;
        sh_tx  <= tx_byte;
        reload <= 1'b0;
      end else if (active) begin
        if (sclk_rise) begin
          sh_rx <= {sh_rx[6:0], mosi_s[1]};
          bitn  <= bitn + 1'b1;
          if (bitn == 3'd7) begin
            rx_byte  <= {sh_rx[6:0], mosi_s[1]};
            rx_valid <= 1'b1;
            reload   <= 1'b1;
          end
        end else if (sclk_fall) begin
          if (reload) begin
            sh_tx  <= tx_byte;
            reload <= 1'b0;
          end else begin
            sh_tx <= {sh_tx[6:0], 1'b0};
          end
        end
      end
    end
  end

endmodule
