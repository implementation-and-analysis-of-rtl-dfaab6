// hadamard_parallel: 4x4 forward Hadamard transform taking a whole block of
// sixteen samples per cycle, with the register barriers chosen by REGS.
//
// The datapath is the four adder layers of the algorithm table, each sixteen
// adders wide: a from W, b from a, c from b and S from c, followed by an
// arithmetic shift right by one (the "/2"). REGS[L] puts a register barrier
// on the output of layer L (0 = the input block W, 1 = a, 2 = b, 3 = c); the
// output layer S is always combinational. REGS = 4'b0000 is the 1P16S
// architecture (no register), 4'b0101 is 2P16S (registers on W and b) and
// 4'b1111 is 4P16S (registers on W, a, b and c).
//
// Interface: in_valid qualifies in_w; out_valid follows in_valid through the
// same barriers, so the latency is the number of bits set in REGS and a new
// block is accepted every cycle. Data registers are not reset; only the
// valid flags are (asynchronous, active low). Word widths are this design's
// own: the internal layers use IN_W+4 bits so nothing overflows, and the
// halved output fits IN_W+3 bits.
module hadamard_parallel
  import hadamard_pkg::*;
#(
  parameter int unsigned IN_W = hadamard_pkg::DEF_IN_W,
  parameter regmask_t    REGS = 4'b0101
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic [15:0][IN_W-1:0]          in_w,
  output logic                           out_valid,
  output logic [15:0][IN_W+2:0]          out_s
);

  localparam int unsigned AW = IN_W + 4;
  typedef logic signed [AW-1:0] acc_t;
  typedef acc_t vec_t [16];

  // One adder layer of the algorithm table, sixteen adders wide.
  function automatic vec_t layer_op(int layer, vec_t x);
    vec_t y;
    for (int i = 0; i < 16; i++) begin
      if (table1_sub(layer, i))
        y[i] = x[table1_src(layer, i, 0)] - x[table1_src(layer, i, 1)];
      else
        y[i] = x[table1_src(layer, i, 0)] + x[table1_src(layer, i, 1)];
    end
    return y;
  endfunction

  // *_d: combinational value of a layer, *_q: after its optional barrier.
  vec_t w_d, w_q, a_d, a_q, b_d, b_q, c_d, c_q, s_d;
  logic v_w, v_a, v_b, v_c;   // valid flag behind each barrier position

  always_comb
    for (int i = 0; i < 16; i++) w_d[i] = acc_t'($signed(in_w[i]));

  assign a_d = layer_op(LAYER_A, w_q);
  assign b_d = layer_op(LAYER_B, a_q);
  assign c_d = layer_op(LAYER_C, b_q);
  assign s_d = layer_op(LAYER_S, c_q);

  // Register barrier W
  if (REGS[0]) begin : g_reg_w
    always_ff @(posedge clk) w_q <= w_d;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) v_w <= 1'b0;
      else        v_w <= in_valid;
  end else begin : g_comb_w
    assign w_q    = w_d;
    assign v_w = in_valid;
  end

  // Register barrier a
  if (REGS[1]) begin : g_reg_a
    always_ff @(posedge clk) a_q <= a_d;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) v_a <= 1'b0;
      else        v_a <= v_w;
  end else begin : g_comb_a
    assign a_q    = a_d;
    assign v_a = v_w;
  end

  // Register barrier b
  if (REGS[2]) begin : g_reg_b
    always_ff @(posedge clk) b_q <= b_d;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) v_b <= 1'b0;
      else        v_b <= v_a;
  end else begin : g_comb_b
    assign b_q    = b_d;
    assign v_b = v_a;
  end

  // Register barrier c
  if (REGS[3]) begin : g_reg_c
    always_ff @(posedge clk) c_q <= c_d;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) v_c <= 1'b0;
      else        v_c <= v_b;
  end else begin : g_comb_c
    assign c_q    = c_d;
    assign v_c = v_b;
  end

  // Divide by two: arithmetic shift right, i.e. drop the low bit.
  always_comb
    for (int i = 0; i < 16; i++) out_s[i] = s_d[i][AW-1:1];

  assign out_valid = v_c;

endmodule
