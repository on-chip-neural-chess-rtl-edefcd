// tpu_alu: every arithmetic function and branch condition on random and corner operands.
module tb_tpu_alu;
  localparam int WATCHDOG = 1000;
  `include "tb_common.svh"
  logic [2:0] funct;
  logic [31:0] a, b, y;
  logic taken;
  tpu_alu dut (.*);
  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [31:0] ey;
      bit et;
      funct = 3'(i % 8);
      a = (i % 5 == 0) ? 32'hFFFF_FFF0 : $urandom;
      b = (i % 3 == 0) ? a : ((i % 7 == 0) ? 32'(i % 32) : $urandom);
      #1;
      case (funct)
        0: ey = a + b;
        1: ey = a * b;
        2: ey = a << (b % 32);
        3: ey = $signed(a) >>> (b % 32);
        4: ey = a & b;
        5: ey = a ^ b;
        6: ey = a | b;
        default: ey = 0;
      endcase
      case (funct)
        0: et = a == b;
        1: et = a != b;
        2: et = $signed(a) >= $signed(b);
        3: et = $signed(a) <= $signed(b);
        4: et = $signed(a) > $signed(b);
        5: et = $signed(a) < $signed(b);
        6: et = $signed(a) < 0;
        default: et = 0;
      endcase
      check(y == ey, $sformatf("funct %0d a=%h b=%h y=%h expected %h", funct, a, b, y, ey));
      check(taken == et, $sformatf("branch %0d a=%h b=%h", funct, a, b));
      @(posedge clk);
    end
    finish();
  end
endmodule
