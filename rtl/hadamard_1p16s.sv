// hadamard_1p16s: the 1P16S architecture, a 4x4 forward Hadamard transform
// with one pipeline stage and sixteen samples per cycle.
//
// All four adder layers (a, b, c, S) and the final shift by one sit in one
// combinational path with no register at all, so a whole 4x4 block W0..W15
// presented on in_w produces S0..S15 on out_s in the same clock cycle: the
// result is ready within one clock period (the source calls this a latency
// of one cycle) and a new block can be taken every cycle. The critical path
// is four adders. out_valid is in_valid passed through. The sample order
// (Wk = row k/4, column k%4), the widths (IN_W in, IN_W+3 out) and the valid
// signal are this design's choices; the datapath follows the published
// algorithm table and block diagram.
module hadamard_1p16s
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
    .REGS (4'b0000)
  ) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_w      (in_w),
    .out_valid (out_valid),
    .out_s     (out_s)
  );

endmodule
