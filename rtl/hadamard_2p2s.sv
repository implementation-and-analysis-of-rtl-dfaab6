// hadamard_2p2s: the 2P2S architecture, a 4x4 forward Hadamard transform
// with two pipeline stages and two samples per cycle.
//
// Two ping-pong barriers, W and b, each holding a block in eight slots of two
// words. Each stage has two adder layers of two adders in series (a then b,
// c then S): four adders per stage, eight in all. Two samples go in per
// in_valid beat in row-major order; results leave two per cycle, S[2j] and
// S[2j+1], 16 cycles after the first input beat of the block, and a block can
// follow every 8 cycles. The source gives two stages of four adders, eight
// slots and the 16-cycle latency; splitting the four layers 2+2 between the
// stages, the operation order, widths and valid signals are this design's
// own (see hadamard_pkg and hadamard_serial).
module hadamard_2p2s
  import hadamard_pkg::*;
#(
  parameter int unsigned IN_W  = hadamard_pkg::DEF_IN_W,
  parameter int unsigned LANES = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [LANES-1:0][IN_W-1:0] in_data,
  output logic                       out_valid,
  output logic                       out_last,
  output logic [LANES-1:0][IN_W+2:0] out_data
);

  hadamard_serial #(
    .IN_W  (IN_W),
    .LANES (LANES),
    .REGS  (4'b0101)
  ) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (in_data),
    .out_valid (out_valid),
    .out_last  (out_last),
    .out_data  (out_data)
  );

endmodule
