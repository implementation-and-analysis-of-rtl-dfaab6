// hadamard_2p4s_2p2: the 2P4S-2+2 architecture, a 4x4 forward Hadamard
// transform with two pipeline stages and four samples per cycle.
//
// Of the four ping-pong barriers of 4P4S only W and b remain: the first stage
// has two adder layers in series (a then b), the second stage two more (c
// then S), four adders per layer. Rows of four samples go in one per in_valid
// beat; results leave one row S[4j..4j+3] per cycle, 8 cycles after the first
// input beat of the block, and a block can follow every 4 cycles. Barrier
// placement and timing follow the source; operation order, widths and valid
// signals are this design's own (see hadamard_serial).
module hadamard_2p4s_2p2
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
