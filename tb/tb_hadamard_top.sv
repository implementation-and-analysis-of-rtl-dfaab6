// tb_hadamard_top: end-to-end testbench of hadamard_top at its default
// parameters.
//
// The same sequence of 4x4 blocks is fed to all eight architectures: whole
// blocks to the three 16-sample ones, rows of four to the four 4-sample ones
// and half rows to 2P2S. Each group has its own driver with its own random
// idle cycles: blocks back to back, idle gaps between blocks and (for the
// serial architectures) idle cycles inside a block. Every output is compared
// with a reference computed from the matrix definition Y = H*W*H/2, and must
// appear in exactly the cycle the architecture's pipeline gives: latency 0,
// 2 and 4 for 1P16S, 2P16S and 4P16S; N*(B-1)+1 cycles after the block's
// last input beat for the serial ones (N beats per block, B barriers), i.e.
// 16, 8, 8, 8 and 16 cycles from first input to first output for an
// unbroken block. The testbench counts how often each situation occurred
// and fails if one never did.
module tb_hadamard_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned IN_W = hadamard_pkg::DEF_IN_W;
  localparam int NBLK = 250;
  localparam int NA   = 8;
  // Per architecture: samples per beat, barriers, 16-sample (parallel) or not.
  localparam int LANES_OF [NA] = '{16, 16, 16, 4, 4, 4, 4, 2};
  localparam int PLAT_OF  [3]  = '{0, 2, 4};
  localparam int NBAR_OF  [NA] = '{0, 0, 0, 4, 2, 2, 2, 2};
  localparam string NAME_OF [NA] = '{"1P16S", "2P16S", "4P16S", "4P4S",
                                     "2P4S-2+2", "2P4S-3+1", "2P4S-1+3", "2P2S"};

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  // 16-sample group
  logic                  p_in_valid = 1'b0;
  logic [15:0][IN_W-1:0] p_in_w = '0;
  logic                  p1_out_valid, p2_out_valid, p4_out_valid;
  logic [15:0][IN_W+2:0] p1_out_s, p2_out_s, p4_out_s;
  // 4-sample group
  logic                  q_in_valid = 1'b0;
  logic [3:0][IN_W-1:0]  q_in_data = '0;
  logic                  s44_out_valid, s22_out_valid, s31_out_valid, s13_out_valid;
  logic                  s44_out_last, s22_out_last, s31_out_last, s13_out_last;
  logic [3:0][IN_W+2:0]  s44_out_data, s22_out_data, s31_out_data, s13_out_data;
  // 2-sample group
  logic                  h_in_valid = 1'b0;
  logic [1:0][IN_W-1:0]  h_in_data = '0;
  logic                  s2_out_valid, s2_out_last;
  logic [1:0][IN_W+2:0]  s2_out_data;

  hadamard_top dut (
    .clk           (clk),
    .rst_n         (rst_n),
    .p1_in_valid   (p_in_valid),
    .p1_in_w       (p_in_w),
    .p1_out_valid  (p1_out_valid),
    .p1_out_s      (p1_out_s),
    .p2_in_valid   (p_in_valid),
    .p2_in_w       (p_in_w),
    .p2_out_valid  (p2_out_valid),
    .p2_out_s      (p2_out_s),
    .p4_in_valid   (p_in_valid),
    .p4_in_w       (p_in_w),
    .p4_out_valid  (p4_out_valid),
    .p4_out_s      (p4_out_s),
    .s44_in_valid  (q_in_valid),
    .s44_in_data   (q_in_data),
    .s44_out_valid (s44_out_valid),
    .s44_out_last  (s44_out_last),
    .s44_out_data  (s44_out_data),
    .s22_in_valid  (q_in_valid),
    .s22_in_data   (q_in_data),
    .s22_out_valid (s22_out_valid),
    .s22_out_last  (s22_out_last),
    .s22_out_data  (s22_out_data),
    .s31_in_valid  (q_in_valid),
    .s31_in_data   (q_in_data),
    .s31_out_valid (s31_out_valid),
    .s31_out_last  (s31_out_last),
    .s31_out_data  (s31_out_data),
    .s13_in_valid  (q_in_valid),
    .s13_in_data   (q_in_data),
    .s13_out_valid (s13_out_valid),
    .s13_out_last  (s13_out_last),
    .s13_out_data  (s13_out_data),
    .s2_in_valid   (h_in_valid),
    .s2_in_data    (h_in_data),
    .s2_out_valid  (s2_out_valid),
    .s2_out_last   (s2_out_last),
    .s2_out_data   (s2_out_data)
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Expected output beats per architecture.
  typedef struct {
    int  s [16];
    int  t;        // cycle in which the beat must appear
    bit  last;
  } beat_t;
  beat_t expq [NA][$];

  int blocks_done [NA];
  int n_b2b [3];        // blocks that followed the previous one directly
  int n_idle [3];       // blocks that came after an idle gap
  int n_inner [3];      // serial blocks with idle cycles between their beats
  int w_all [NBLK][16];
  int s_all [NBLK][16];

  // Independent reference: Y = H * W * H computed as two matrix products,
  // then halved with an arithmetic shift.
  function automatic void ref_hadamard(input int w [16], output int s [16]);
    int h [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    int t [4][4];
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += h[i][k] * w[4*k + j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int y;
        y = 0;
        for (int k = 0; k < 4; k++) y += t[i][k] * h[k][j];
        s[4*i + j] = y >>> 1;
      end
  endfunction

  // Test blocks: a few corner cases first, then random samples.
  function automatic void make_block(int n, output int w [16]);
    int lo, hi;
    lo = -(1 << (IN_W - 1));
    hi = (1 << (IN_W - 1)) - 1;
    for (int i = 0; i < 16; i++)
      case (n)
        0:       w[i] = hi;
        1:       w[i] = lo;
        2:       w[i] = ((i / 4 + i % 4) % 2 == 0) ? hi : lo;
        3:       w[i] = (i == 5) ? 1 : 0;
        4:       w[i] = -1;
        default: w[i] = int'($urandom_range(hi - lo)) + lo;
      endcase
  endfunction

  // Driver of one group: g = 0 (16 samples per beat), 1 (4) or 2 (2).
  task automatic drive_group(int g);
    int lanes, n_beats, t_first, t_last, prev_last, mode;
    bit gapped;
    lanes   = (g == 0) ? 16 : (g == 1) ? 4 : 2;
    n_beats = 16 / lanes;
    prev_last = -10;
    for (int n = 0; n < NBLK; n++) begin
      mode = (n < 6) ? 0 : int'($urandom_range(3));
      gapped = 1'b0;
      @(posedge clk);
      #1;
      if (mode == 1) begin
        set_valid(g, 1'b0);
        repeat ($urandom_range(1, 2 * n_beats)) @(posedge clk);
        #1;
      end
      for (int j = 0; j < n_beats; j++) begin
        if (j > 0) begin
          @(posedge clk);
          #1;
          if (mode == 2 && $urandom_range(1) == 1) begin
            set_valid(g, 1'b0);
            gapped = 1'b1;
            repeat ($urandom_range(1, 3)) @(posedge clk);
            #1;
          end
        end
        for (int k = 0; k < lanes; k++) set_lane(g, k, w_all[n][lanes * j + k]);
        set_valid(g, 1'b1);
        if (j == 0) t_first = cyc;
        if (j == n_beats - 1) t_last = cyc;
      end
      if (t_first == prev_last + 1) n_b2b[g]++;
      else                          n_idle[g]++;
      if (gapped) n_inner[g]++;
      prev_last = t_last;
      // Expected beats of every architecture of this group.
      for (int a = 0; a < NA; a++) begin
        beat_t e;
        if (LANES_OF[a] != lanes) continue;
        for (int j = 0; j < n_beats; j++) begin
          for (int i = 0; i < 16; i++) e.s[i] = (i < lanes) ? s_all[n][lanes * j + i] : 0;
          e.t    = (g == 0) ? t_last + PLAT_OF[a] : t_last + 1 + n_beats * (NBAR_OF[a] - 1) + j;
          e.last = (j == n_beats - 1);
          expq[a].push_back(e);
        end
      end
    end
    @(posedge clk);
    #1;
    set_valid(g, 1'b0);
  endtask

  task automatic set_valid(int g, logic v);
    case (g)
      0:       p_in_valid = v;
      1:       q_in_valid = v;
      default: h_in_valid = v;
    endcase
  endtask

  task automatic set_lane(int g, int k, int v);
    case (g)
      0:       p_in_w[k]    = v[IN_W-1:0];
      1:       q_in_data[k] = v[IN_W-1:0];
      default: h_in_data[k] = v[IN_W-1:0];
    endcase
  endtask

  // Compare one output beat of architecture a.
  task automatic check_beat(int a, logic last, int lanes, int got [16]);
    beat_t e;
    checks++;
    if (expq[a].size() == 0) begin
      failures++;
      $display("FAIL: %s: unexpected output at cycle %0d", NAME_OF[a], cyc);
      return;
    end
    e = expq[a].pop_front();
    if (cyc != e.t) begin
      failures++;
      if (failures < 20) $display("FAIL: %s: beat at cycle %0d, expected %0d", NAME_OF[a], cyc, e.t);
    end
    if (lanes < 16) begin
      checks++;
      if (last != e.last) begin
        failures++;
        $display("FAIL: %s: out_last wrong at cycle %0d", NAME_OF[a], cyc);
      end
    end
    for (int i = 0; i < lanes; i++) begin
      checks++;
      if (got[i] != e.s[i]) begin
        failures++;
        if (failures < 20)
          $display("FAIL: %s: cycle %0d lane %0d = %0d, expected %0d", NAME_OF[a], cyc, i, got[i], e.s[i]);
      end
    end
    if (e.last) blocks_done[a]++;
  endtask

  always @(negedge clk)
    if (rst_n) begin
      int got [16];
      if (p1_out_valid) begin
        for (int i = 0; i < 16; i++) got[i] = int'($signed(p1_out_s[i]));
        check_beat(0, 1'b1, 16, got);
      end
      if (p2_out_valid) begin
        for (int i = 0; i < 16; i++) got[i] = int'($signed(p2_out_s[i]));
        check_beat(1, 1'b1, 16, got);
      end
      if (p4_out_valid) begin
        for (int i = 0; i < 16; i++) got[i] = int'($signed(p4_out_s[i]));
        check_beat(2, 1'b1, 16, got);
      end
      if (s44_out_valid) begin
        for (int i = 0; i < 4; i++) got[i] = int'($signed(s44_out_data[i]));
        check_beat(3, s44_out_last, 4, got);
      end
      if (s22_out_valid) begin
        for (int i = 0; i < 4; i++) got[i] = int'($signed(s22_out_data[i]));
        check_beat(4, s22_out_last, 4, got);
      end
      if (s31_out_valid) begin
        for (int i = 0; i < 4; i++) got[i] = int'($signed(s31_out_data[i]));
        check_beat(5, s31_out_last, 4, got);
      end
      if (s13_out_valid) begin
        for (int i = 0; i < 4; i++) got[i] = int'($signed(s13_out_data[i]));
        check_beat(6, s13_out_last, 4, got);
      end
      if (s2_out_valid) begin
        for (int i = 0; i < 2; i++) got[i] = int'($signed(s2_out_data[i]));
        check_beat(7, s2_out_last, 2, got);
      end
    end

  initial begin
    for (int n = 0; n < NBLK; n++) begin
      make_block(n, w_all[n]);
      ref_hadamard(w_all[n], s_all[n]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      drive_group(0);
      drive_group(1);
      drive_group(2);
    join
    repeat (40) @(posedge clk);
    for (int a = 0; a < NA; a++) begin
      checks++;
      if (blocks_done[a] != NBLK || expq[a].size() != 0) begin
        failures++;
        $display("FAIL: %s finished %0d of %0d blocks", NAME_OF[a], blocks_done[a], NBLK);
      end
    end
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (n_b2b[g] == 0 || n_idle[g] == 0 || (g > 0 && n_inner[g] == 0)) begin
        failures++;
        $display("FAIL: input group %0d missed a traffic case", g);
      end
      $display("group %0d: back-to-back blocks %0d, after idle gap %0d, with inner gaps %0d",
               g, n_b2b[g], n_idle[g], n_inner[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 60 + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
