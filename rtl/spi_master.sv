// SPI master (mode 0: SCLK idles low, both sides sample on the rising edge, data
// changes on the falling edge, MSB first) for the link from the tree-traversal FPGA
// to the TPU FPGA.
//
// One byte per start pulse. cs_n falls with the first byte of a transaction and stays
// low until a byte sent with last=1 has finished. SCLK is clk divided by 2*CLK_DIV;
// a byte takes 16*CLK_DIV cycles plus CLK_DIV cycles of select set-up at the start of
// a transaction and after its last byte. done pulses with the received byte in rx_byte.
// The description only says the two FPGAs talk over SPI; mode, bit order and clock
// rate are this design's choices.
module spi_master #(
  parameter int CLK_DIV = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tx_byte,
  input  logic       last,
  output logic [7:0] rx_byte,
  output logic       done,
  output logic       busy,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso,
  output logic       cs_n
);

  typedef enum logic [2:0] {IDLE, SETUP, HIGH, LOW, HOLD, GAP} state_e;
  state_e state;
  logic [$clog2(CLK_DIV+1)-1:0] cnt;
  logic [2:0] bitn;
  logic [7:0] sh_tx, sh_rx;
  logic       last_q;

  assign busy = (state != IDLE);
  assign mosi = sh_tx[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cnt     <= '0;
      bitn    <= '0;
      sh_tx   <= '0;
      sh_rx   <= '0;
      last_q  <= 1'b0;
      sclk    <= 1'b0;
      cs_n    <= 1'b1;
      rx_byte <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          sh_tx  <= tx_byte;
          last_q <= last;
          bitn   <= '0;
          cnt    <= '0;
          if (cs_n) begin
            cs_n  <= 1'b0;
            state <= SETUP;
          end else begin
            state <= LOW;
          end
        end
        SETUP: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == CLK_DIV - 1) begin
            cnt   <= '0;
            state <= LOW;
          end
        end
        LOW: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == CLK_DIV - 1) begin
            cnt   <= '0;
            sclk  <= 1'b1;
            sh_rx <= {sh_rx[6:0], miso};
            state <= HIGH;
          end
        end
        HIGH: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == CLK_DIV - 1) begin
            cnt  <= '0;
            sclk <= 1'b0;
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) begin
              rx_byte <= sh_rx;
              done    <= !last_q;
              state   <= last_q ? HOLD : IDLE;
            end else begin
              sh_tx <= {sh_tx[6:0], 1'b0};
              state <= LOW;
            end
          end
        end
        HOLD: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == CLK_DIV - 1) begin
            cnt   <= '0;
            cs_n  <= 1'b1;
            state <= GAP;
          end
        end
        GAP: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == CLK_DIV - 1) begin
            cnt   <= '0;
            done  <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
