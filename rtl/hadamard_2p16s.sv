// hadamard_2p16s: the 2P16S architecture, a 4x4 forward Hadamard transform
// with two pipeline stages and sixteen samples per cycle.
//
// The input block is registered (barrier W); layers a and b follow as one
// stage of two adders and are registered at b; layers c and S and the shift
// by one form the second stage and drive out_s directly. A block presented
// with in_valid in cycle t appears with out_valid in cycle t+2 (latency 2),
// and a new block is accepted every cycle. Which two of the four barriers of
// 4P16S are kept is not spelled out by the source; W and b is the placement
// that gives the two-adder critical path it states. Sample order, widths and
// the valid signal are this design's choices.
module hadamard_2p16s
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
    .REGS (4'b0101)
  ) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_w      (in_w),
    .out_valid (out_valid),
    .out_s     (out_s)
  );

endmodule
