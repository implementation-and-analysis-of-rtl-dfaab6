// hadamard_4p16s: the 4P16S architecture, a 4x4 forward Hadamard transform
// with four pipeline stages and sixteen samples per cycle.
//
// Register barriers sit on the input block W and on the outputs of adder
// layers a, b and c, sixteen words each; the last adder layer and the shift
// by one drive out_s from the c barrier. A block presented with in_valid in
// cycle t appears with out_valid in cycle t+4 (latency 4), and a new block is
// accepted every cycle. The barrier placement follows the published block
// diagram; sample order, widths and the valid signal are this design's own.
module hadamard_4p16s
  import hadamard_pkg::*;
#(
  parameter int unsigned IN_W = hadamard_pkg::DEF_IN_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [15:0][IN_W-1:0] in_w,
  output logic                  out_valid,
  output logic [15:0][IN_W+2:0] out_s
);

  hadamard_parallel #(
    .IN_W (IN_W),
    .REGS (4'b1111)
  ) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_w      (in_w),
    .out_valid (out_valid),
    .out_s     (out_s)
  );

endmodule
