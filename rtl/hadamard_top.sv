// hadamard_top: the eight 4x4 forward Hadamard transform architectures side
// by side, for simulating and synthesizing them together.
//
// Every architecture computes Y = H*W*H/2 of H.264/AVC on a 4x4 block of DC
// coefficients with the same four adder layers; they differ in how many
// samples they take per cycle and where register barriers sit:
//
//   prefix  architecture  samples/cycle  barriers        latency (cycles)
//   p1_     1P16S         16             none            0 (one clock period)
//   p2_     2P16S         16             W, b            2
//   p4_     4P16S         16             W, a, b, c      4
//   s44_    4P4S           4             W, a, b, c      16
//   s22_    2P4S-2+2       4             W, b            8
//   s31_    2P4S-3+1       4             W, c            8
//   s13_    2P4S-1+3       4             W, a            8
//   s2_     2P2S           2             W, b            16
//
// The 16-sample architectures take a whole block with *_in_valid and return
// it with *_out_valid; the others take one row (or half row) per beat in
// row-major order and return results the same way, with *_out_last on the
// last beat of a block. All share clk and the asynchronous active-low rst_n;
// nothing else is shared, so each can be driven on its own. The source
// compares the eight and recommends 1P16S and 2P16S for the intra
// prediction loop; putting all of them in one top is this design's choice.
module hadamard_top
  import hadamard_pkg::*;
#(
  parameter int unsigned IN_W = hadamard_pkg::DEF_IN_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // 1P16S
  input  logic                  p1_in_valid,
  input  logic [15:0][IN_W-1:0] p1_in_w,
  output logic                  p1_out_valid,
  output logic [15:0][IN_W+2:0] p1_out_s,
  // 2P16S
  input  logic                  p2_in_valid,
  input  logic [15:0][IN_W-1:0] p2_in_w,
  output logic                  p2_out_valid,
  output logic [15:0][IN_W+2:0] p2_out_s,
  // 4P16S
  input  logic                  p4_in_valid,
  input  logic [15:0][IN_W-1:0] p4_in_w,
  output logic                  p4_out_valid,
  output logic [15:0][IN_W+2:0] p4_out_s,
  // 4P4S
  input  logic                  s44_in_valid,
  input  logic [3:0][IN_W-1:0]  s44_in_data,
  output logic                  s44_out_valid,
  output logic                  s44_out_last,
  output logic [3:0][IN_W+2:0]  s44_out_data,
  // 2P4S-2+2
  input  logic                  s22_in_valid,
  input  logic [3:0][IN_W-1:0]  s22_in_data,
  output logic                  s22_out_valid,
  output logic                  s22_out_last,
  output logic [3:0][IN_W+2:0]  s22_out_data,
  // 2P4S-3+1
  input  logic                  s31_in_valid,
  input  logic [3:0][IN_W-1:0]  s31_in_data,
  output logic                  s31_out_valid,
  output logic                  s31_out_last,
  output logic [3:0][IN_W+2:0]  s31_out_data,
  // 2P4S-1+3
  input  logic                  s13_in_valid,
  input  logic [3:0][IN_W-1:0]  s13_in_data,
  output logic                  s13_out_valid,
  output logic                  s13_out_last,
  output logic [3:0][IN_W+2:0]  s13_out_data,
  // 2P2S
  input  logic                  s2_in_valid,
  input  logic [1:0][IN_W-1:0]  s2_in_data,
  output logic                  s2_out_valid,
  output logic                  s2_out_last,
  output logic [1:0][IN_W+2:0]  s2_out_data
);

  hadamard_1p16s #(
    .IN_W (IN_W)
  ) u_p1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (p1_in_valid),
    .in_w      (p1_in_w),
    .out_valid (p1_out_valid),
    .out_s     (p1_out_s)
  );

  hadamard_2p16s #(
    .IN_W (IN_W)
  ) u_p2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (p2_in_valid),
    .in_w      (p2_in_w),
    .out_valid (p2_out_valid),
    .out_s     (p2_out_s)
  );

  hadamard_4p16s #(
    .IN_W (IN_W)
  ) u_p4 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (p4_in_valid),
    .in_w      (p4_in_w),
    .out_valid (p4_out_valid),
    .out_s     (p4_out_s)
  );

  hadamard_4p4s #(
    .IN_W  (IN_W),
    .LANES (4)
  ) u_s44 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (s44_in_valid),
    .in_data   (s44_in_data),
    .out_valid (s44_out_valid),
    .out_last  (s44_out_last),
    .out_data  (s44_out_data)
  );

  hadamard_2p4s_2p2 #(
    .IN_W  (IN_W),
    .LANES (4)
  ) u_s22 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (s22_in_valid),
    .in_data   (s22_in_data),
    .out_valid (s22_out_valid),
    .out_last  (s22_out_last),
    .out_data  (s22_out_data)
  );

  hadamard_2p4s_3p1 #(
    .IN_W  (IN_W),
    .LANES (4)
  ) u_s31 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (s31_in_valid),
    .in_data   (s31_in_data),
    .out_valid (s31_out_valid),
    .out_last  (s31_out_last),
    .out_data  (s31_out_data)
  );

  hadamard_2p4s_1p3 #(
    .IN_W  (IN_W),
    .LANES (4)
  ) u_s13 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (s13_in_valid),
    .in_data   (s13_in_data),
    .out_valid (s13_out_valid),
    .out_last  (s13_out_last),
    .out_data  (s13_out_data)
  );

  hadamard_2p2s #(
    .IN_W  (IN_W),
    .LANES (2)
  ) u_s2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (s2_in_valid),
    .in_data   (s2_in_data),
    .out_valid (s2_out_valid),
    .out_last  (s2_out_last),
    .out_data  (s2_out_data)
  );

endmodule
