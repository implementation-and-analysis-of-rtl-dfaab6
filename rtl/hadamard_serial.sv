// hadamard_serial: 4x4 forward Hadamard transform that takes and delivers
// LANES samples per cycle, built from ping-pong register barriers.
//
// A block of sixteen samples W0..W15 arrives in row-major order, LANES per
// in_valid beat, and is collected in the ping-pong barrier W. REGS selects
// which further layer outputs (1 = a, 2 = b, 3 = c) get a ping-pong barrier
// too; REGS[0] (barrier W) must be set. Each barrier starts a stage: a row of
// LANES adders per adder layer up to the next barrier (or up to the output),
// with a multiplexer in front of every adder input. When a barrier swaps in a
// full block, its stage runs for N = 16/LANES cycles and in cycle j lane k of
// each of its layers computes result sched(REGS, LANES, layer, j, k) of the
// algorithm table. The first layer of a stage picks its operands anywhere in
// the barrier's read bank; a following layer takes them from the lanes of the
// layer before it in the same cycle. Results of the last layer before a
// barrier are written into that barrier and swapped in after N cycles; the
// output layer S, shifted right by one, drives out_data.
//
// Timing: with an unbroken input stream the first block's results leave
// 4*B cycles after its first input beat, B being the number of barriers
// (one per stage), one beat per cycle for N cycles, and further blocks follow
// every N cycles. Input beats may have gaps; the input is always accepted,
// since each stage takes exactly N cycles and a block cannot arrive faster.
// out_last marks the last beat of a block. Only the control state is reset.
//
// What follows the source: the ping-pong barriers, the number of lanes, the
// adders per stage and the barrier placements of 4P4S, 2P4S and 2P2S. This
// design's own: the order of operations within a block (see hadamard_pkg),
// the counters that sequence the stages, the widths and the valid signals.
module hadamard_serial
  import hadamard_pkg::*;
#(
  parameter int unsigned IN_W  = hadamard_pkg::DEF_IN_W,
  parameter int unsigned LANES = 4,
  parameter regmask_t    REGS  = 4'b0101
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [LANES-1:0][IN_W-1:0]   in_data,
  output logic                         out_valid,
  output logic                         out_last,
  output logic [LANES-1:0][IN_W+2:0]   out_data
);

  localparam int unsigned N  = 16 / LANES;
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned AW = IN_W + 4;
  typedef logic signed [AW-1:0] acc_t;

  // Barrier that starts the stage computing adder layer l (1..4).
  function automatic int owner(int l);
    for (int b = l - 1; b > 0; b--)
      if (REGS[b]) return b;
    return 0;
  endfunction

  localparam bit SCHED_OK = sched_ok(REGS, LANES);
  if (!REGS[0] || !SCHED_OK || (16 % LANES) != 0) begin : g_bad_config
    $error("hadamard_serial: unsupported LANES/REGS combination");
  end

  // Control of the stage behind each barrier position 0..3 (W, a, b, c).
  logic [3:0]          run;   // stage is working on a block
  logic [3:0][CW-1:0]  cnt;   // cycle j of that block
  logic [3:0]          swap;  // barrier receives a full block this cycle

  // Barrier contents (read banks).
  logic [3:0][15:0][AW-1:0]   rd;

  // Input side: fill barrier W slot by slot.
  logic [CW-1:0]              in_cnt;
  logic [LANES-1:0][3:0]      w_idx;
  logic [LANES-1:0][AW-1:0]   w_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        in_cnt <= '0;
    else if (in_valid) in_cnt <= (in_cnt == CW'(N - 1)) ? '0 : in_cnt + 1'b1;

  always_comb
    for (int k = 0; k < LANES; k++) begin
      w_idx[k]  = 4'(LANES * int'(in_cnt) + k);
      w_data[k] = AW'($signed(in_data[k]));
    end

  // A barrier receives a full block with the last beat of its producer.
  always_comb begin
    swap[0] = in_valid && (in_cnt == CW'(N - 1));
    for (int b = 1; b < 4; b++)
      swap[b] = REGS[b] && run[owner(b)] && (cnt[owner(b)] == CW'(N - 1));
  end

  // Stage sequencers. A stage starts on the cycle after its barrier swaps
  // and runs N cycles; a swap in its last cycle starts the next block at
  // once. Positions without a barrier stay idle.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      run <= '0;
      cnt <= '0;
    end else begin
      for (int b = 0; b < 4; b++)
        if (REGS[b]) begin
          if (swap[b]) begin
            run[b] <= 1'b1;
            cnt[b] <= '0;
          end else if (run[b]) begin
            run[b] <= (cnt[b] != CW'(N - 1));
            cnt[b] <= cnt[b] + 1'b1;
          end
        end
    end

  hadamard_pingpong #(
    .W     (AW),
    .LANES (LANES)
  ) u_bar_w (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (in_valid),
    .wr_idx  (w_idx),
    .wr_data (w_data),
    .swap    (swap[0]),
    .rd_data (rd[0])
  );

  // Barriers a, b, c where REGS asks for them.
  for (genvar b = 0; b < 4; b++) begin : g_stage
    if (REGS[b]) begin : g_on
      // A new block never arrives while the stage still needs the old one.
      assert property (@(posedge clk) disable iff (!rst_n)
                       swap[b] |-> (!run[b] || cnt[b] == CW'(N - 1)))
        else $error("barrier %0d overwritten while in use", b);

      if (b > 0) begin : g_bar
        localparam int O = owner(b);
        logic [LANES-1:0][3:0] idx;

        always_comb
          for (int k = 0; k < LANES; k++)
            idx[k] = 4'(sched(REGS, LANES, b, int'(cnt[O]), k));

        hadamard_pingpong #(
          .W     (AW),
          .LANES (LANES)
        ) u_bar (
          .clk     (clk),
          .rst_n   (rst_n),
          .wr_en   (run[O]),
          .wr_idx  (idx),
          .wr_data (g_layer[b].q),
          .swap    (swap[b]),
          .rd_data (rd[b])
        );
      end
    end else begin : g_off
      assign rd[b] = '0;
    end
  end

  // Adder layers: LANES adders each, operands through multiplexers. The
  // lanes of layer l are g_layer[l].q.
  for (genvar l = LAYER_A; l <= LAYER_S; l++) begin : g_layer
    localparam int O = owner(l);
    logic [LANES-1:0][AW-1:0] q;
    logic [LANES-1:0][AW-1:0] x0, x1;   // operands of each lane
    logic [LANES-1:0]         sub;

    if (REGS[l-1]) begin : g_from_barrier
      // First layer of a stage: any word of the barrier's read bank.
      always_comb
        for (int k = 0; k < LANES; k++) begin
          int idx;
          idx    = sched(REGS, LANES, l, int'(cnt[O]), k);
          x0[k]  = rd[l-1][table1_src(l, idx, 0)];
          x1[k]  = rd[l-1][table1_src(l, idx, 1)];
          sub[k] = table1_sub(l, idx);
        end
    end else begin : g_from_lanes
      // Later layer of a stage: the lanes of the layer before, same cycle.
      always_comb
        for (int k = 0; k < LANES; k++) begin
          int j, idx;
          j      = int'(cnt[O]);
          idx    = sched(REGS, LANES, l, j, k);
          x0[k]  = g_layer[l-1].q[lane_of(REGS, LANES, l - 1, j, table1_src(l, idx, 0))];
          x1[k]  = g_layer[l-1].q[lane_of(REGS, LANES, l - 1, j, table1_src(l, idx, 1))];
          sub[k] = table1_sub(l, idx);
        end
    end

    always_comb
      for (int k = 0; k < LANES; k++)
        q[k] = sub[k] ? acc_t'(x0[k]) - acc_t'(x1[k]) : acc_t'(x0[k]) + acc_t'(x1[k]);
  end

  // Output layer, halved by an arithmetic shift.
  localparam int OS = owner(LAYER_S);

  always_comb
    for (int k = 0; k < LANES; k++) out_data[k] = g_layer[LAYER_S].q[k][AW-1:1];

  assign out_valid = run[OS];
  assign out_last  = run[OS] && (cnt[OS] == CW'(N - 1));

endmodule
