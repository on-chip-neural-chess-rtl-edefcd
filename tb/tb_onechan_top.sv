// End-to-end test of the analyzer at reduced depth and debounce: load the TPU program
// and a material-counting network, play and undo player moves with the switches and
// buttons, scroll the display, run a search and compare the LED move and the root
// value with a software negamax that uses the same move rules and evaluation.
`define TOP_INST onechan_top #(.DEPTH(DEPTH), .DEBOUNCE(DEBOUNCE), .REFRESH(4))
module tb_onechan_top;
  localparam int DEPTH      = 2;
  localparam int DEBOUNCE   = 4;
  localparam longint MAX_CYCLES = 64'd30_000_000;
  localparam int N_SETUP    = 7;
  // e2-e4, d7-d5, g1-f3 (undone), b8-c6, undo, b8-c6 ... keeps material in contact
  onechan_pkg::move_t setup_mv [N_SETUP] = '{
    '{from: 6'd12, to: 6'd28}, '{from: 6'd51, to: 6'd35}, '{from: 6'd6, to: 6'd21},
    '{from: 6'd0,  to: 6'd0},  '{from: 6'd57, to: 6'd42}, '{from: 6'd11, to: 6'd19},
    '{from: 6'd59, to: 6'd43}};
`include "onechan_top_body.svh"
endmodule
