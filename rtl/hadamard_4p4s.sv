// hadamard_4p4s: the 4P4S architecture, a 4x4 forward Hadamard transform
// with four pipeline stages and four samples per cycle.
//
// Four ping-pong register barriers (W, a, b, c), each holding a block in four
// slots of four words, with four adders and their operand multiplexers behind
// each. One input row of four samples is taken per in_valid beat; after four
// beats the block moves on, and each stage needs four cycles per block. The
// first block's results leave 16 cycles after its first input beat, one row
// S[4j..4j+3] per cycle, so the first block is done after 20 cycles and each
// further block 4 cycles later. The barrier placement, adder count and
// timing follow the source; the operation order, widths, valid signals and
// the out_last marker are this design's own (see hadamard_serial).
module hadamard_4p4s
  import hadamard_pkg::*;
#(
  parameter int unsigned IN_W  = hadamard_pkg::DEF_IN_W,
  parameter int unsigned LANES = 4
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
    .REGS  (4'b1111)
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
