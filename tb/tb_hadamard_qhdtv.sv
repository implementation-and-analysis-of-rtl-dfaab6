// tb_hadamard_qhdtv: workload testbench of hadamard_top at its default
// parameters: the luma DC blocks of one QHDTV frame, then a run of blocks
// issued the way the intra prediction loop issues them.
//
// A 3840x2048 frame has 3840*2048/256 = 30720 macroblocks. In the worst
// case every one is coded in intra 16x16 mode, and each then sends one 4x4
// block of DC coefficients (491520 samples per frame) through the
// transform. Phase 1 streams all 30720 blocks back to back into each of the
// eight architectures at once, checks every result against the matrix
// definition, and checks the cycles the frame takes: 30720 blocks of
// 16/LANES cycles each plus the pipeline fill. The frame time at 30 frames
// per second gives the lowest clock frequency that keeps up, which is
// printed next to the figures published for these architectures (0.92,
// 3.69 and 7.38 MHz for 16, 4 and 2 samples per cycle).
//
// Phase 2 issues 64 blocks one at a time, each only after the previous
// block's last result has left, as a loop that must reconstruct a block
// before predicting the next one does. Each block then
// costs its full turnaround: 1, 3 and 5 cycles for 1P16S, 2P16S and 4P16S;
// 20, 12, 12, 12 and 24 cycles for 4P4S, the three 2P4S and 2P2S.
module tb_hadamard_qhdtv;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned IN_W = hadamard_pkg::DEF_IN_W;
  localparam int NA      = 8;
  localparam int NFRAME  = 3840 * 2048 / 256;   // DC blocks in one frame
  localparam int NLOOP   = 64;                  // blocks of the closed-loop run
  localparam int LANES_OF [NA] = '{16, 16, 16, 4, 4, 4, 4, 2};
  localparam int NBAR_OF  [NA] = '{0, 2, 4, 4, 2, 2, 2, 2};   // parallel: latency
  localparam string NAME_OF [NA] = '{"1P16S", "2P16S", "4P16S", "4P4S",
                                     "2P4S-2+2", "2P4S-3+1", "2P4S-1+3", "2P2S"};
  localparam real PUB_MHZ [NA] = '{0.92, 0.92, 0.92, 3.69, 3.69, 3.69, 3.69, 7.38};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Uniform view of the eight architectures.
  logic in_valid [NA];
  int   in_lane  [NA][16];
  logic out_valid [NA];
  logic out_last  [NA];
  int   out_lane  [NA][16];

  logic [15:0][IN_W-1:0] p1_in_w, p2_in_w, p4_in_w;
  logic [15:0][IN_W+2:0] p1_out_s, p2_out_s, p4_out_s;
  logic [3:0][IN_W-1:0]  s44_in, s22_in, s31_in, s13_in;
  logic [3:0][IN_W+2:0]  s44_out, s22_out, s31_out, s13_out;
  logic [1:0][IN_W-1:0]  s2_in;
  logic [1:0][IN_W+2:0]  s2_out;

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      p1_in_w[i] = in_lane[0][i][IN_W-1:0];
      p2_in_w[i] = in_lane[1][i][IN_W-1:0];
      p4_in_w[i] = in_lane[2][i][IN_W-1:0];
      out_lane[0][i] = int'($signed(p1_out_s[i]));
      out_lane[1][i] = int'($signed(p2_out_s[i]));
      out_lane[2][i] = int'($signed(p4_out_s[i]));
    end
    for (int i = 0; i < 4; i++) begin
      s44_in[i] = in_lane[3][i][IN_W-1:0];
      s22_in[i] = in_lane[4][i][IN_W-1:0];
      s31_in[i] = in_lane[5][i][IN_W-1:0];
      s13_in[i] = in_lane[6][i][IN_W-1:0];
      out_lane[3][i] = int'($signed(s44_out[i]));
      out_lane[4][i] = int'($signed(s22_out[i]));
      out_lane[5][i] = int'($signed(s31_out[i]));
      out_lane[6][i] = int'($signed(s13_out[i]));
    end
    for (int i = 0; i < 2; i++) begin
      s2_in[i] = in_lane[7][i][IN_W-1:0];
      out_lane[7][i] = int'($signed(s2_out[i]));
    end
  end

  assign out_last[0] = out_valid[0];
  assign out_last[1] = out_valid[1];
  assign out_last[2] = out_valid[2];

  hadamard_top dut (
    .clk           (clk),
    .rst_n         (rst_n),
    .p1_in_valid   (in_valid[0]),
    .p1_in_w       (p1_in_w),
    .p1_out_valid  (out_valid[0]),
    .p1_out_s      (p1_out_s),
    .p2_in_valid   (in_valid[1]),
    .p2_in_w       (p2_in_w),
    .p2_out_valid  (out_valid[1]),
    .p2_out_s      (p2_out_s),
    .p4_in_valid   (in_valid[2]),
    .p4_in_w       (p4_in_w),
    .p4_out_valid  (out_valid[2]),
    .p4_out_s      (p4_out_s),
    .s44_in_valid  (in_valid[3]),
    .s44_in_data   (s44_in),
    .s44_out_valid (out_valid[3]),
    .s44_out_last  (out_last[3]),
    .s44_out_data  (s44_out),
    .s22_in_valid  (in_valid[4]),
    .s22_in_data   (s22_in),
    .s22_out_valid (out_valid[4]),
    .s22_out_last  (out_last[4]),
    .s22_out_data  (s22_out),
    .s31_in_valid  (in_valid[5]),
    .s31_in_data   (s31_in),
    .s31_out_valid (out_valid[5]),
    .s31_out_last  (out_last[5]),
    .s31_out_data  (s31_out),
    .s13_in_valid  (in_valid[6]),
    .s13_in_data   (s13_in),
    .s13_out_valid (out_valid[6]),
    .s13_out_last  (out_last[6]),
    .s13_out_data  (s13_out),
    .s2_in_valid   (in_valid[7]),
    .s2_in_data    (s2_in),
    .s2_out_valid  (out_valid[7]),
    .s2_out_last   (out_last[7]),
    .s2_out_data   (s2_out)
  );

  int checks = 0;
  int failures = 0;

  typedef struct {
    int s [16];
  } beat_t;
  beat_t expq [NA][$];
  int blocks_done [NA];
  int last_out    [NA];   // cycle of the most recent last beat

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

  // Push the expected output beats of block w for architecture a.
  task automatic expect_block(int a, int w [16]);
    int s [16];
    int lanes;
    beat_t e;
    lanes = LANES_OF[a];
    ref_hadamard(w, s);
    for (int j = 0; j < 16 / lanes; j++) begin
      for (int i = 0; i < 16; i++) e.s[i] = (i < lanes) ? s[lanes * j + i] : 0;
      expq[a].push_back(e);
    end
  endtask

  // Drive one block into architecture a, one beat per cycle.
  task automatic send_block(int a, int w [16]);
    int lanes;
    lanes = LANES_OF[a];
    expect_block(a, w);
    for (int j = 0; j < 16 / lanes; j++) begin
      for (int k = 0; k < lanes; k++) in_lane[a][k] = w[lanes * j + k];
      in_valid[a] = 1'b1;
      @(posedge clk);
      #1;
    end
    in_valid[a] = 1'b0;
  endtask

  // Expected cycles from the first input beat to the last output beat.
  function automatic int span_of(int a, int nblk);
    int n;
    n = 16 / LANES_OF[a];
    if (LANES_OF[a] == 16) return nblk + NBAR_OF[a];
    return nblk * n + n * NBAR_OF[a];
  endfunction

  int frame_cycles [NA];
  int loop_cycles  [NA];

  task automatic run_arch(int a);
    int w [16];
    int t0;
    // Phase 1: one frame of DC blocks, back to back.
    @(posedge clk);
    #1;
    t0 = cyc;
    for (int n = 0; n < NFRAME; n++) begin
      make_block(n, w);
      send_block(a, w);
    end
    wait (blocks_done[a] == NFRAME);
    frame_cycles[a] = last_out[a] - t0 + 1;
    checks++;
    if (frame_cycles[a] != span_of(a, NFRAME)) begin
      failures++;
      $display("FAIL: %s: frame took %0d cycles, expected %0d", NAME_OF[a], frame_cycles[a],
               span_of(a, NFRAME));
    end
    // Phase 2: closed loop, each block waits for the previous result.
    repeat (2) @(posedge clk);
    #1;
    t0 = cyc;
    for (int n = 0; n < NLOOP; n++) begin
      int tb;
      make_block(n + 7, w);
      tb = cyc;
      send_block(a, w);
      wait (blocks_done[a] == NFRAME + n + 1);
      checks++;
      if (last_out[a] - tb + 1 != span_of(a, 1)) begin
        failures++;
        $display("FAIL: %s: closed-loop turnaround %0d cycles, expected %0d", NAME_OF[a],
                 last_out[a] - tb + 1, span_of(a, 1));
      end
      @(posedge clk);
      #1;
    end
    loop_cycles[a] = span_of(a, 1);
  endtask

  // Checker
  always @(negedge clk)
    if (rst_n)
      for (int a = 0; a < NA; a++)
        if (out_valid[a]) begin
          beat_t e;
          checks++;
          if (expq[a].size() == 0) begin
            failures++;
            $display("FAIL: %s: unexpected output at cycle %0d", NAME_OF[a], cyc);
          end else begin
            e = expq[a].pop_front();
            for (int i = 0; i < LANES_OF[a]; i++)
              if (out_lane[a][i] != e.s[i]) begin
                failures++;
                if (failures < 20)
                  $display("FAIL: %s: cycle %0d lane %0d = %0d, expected %0d", NAME_OF[a], cyc, i,
                           out_lane[a][i], e.s[i]);
              end
          end
          if (out_last[a]) begin
            blocks_done[a]++;
            last_out[a] = cyc;
          end
        end

  initial begin
    for (int a = 0; a < NA; a++) begin
      in_valid[a] = 1'b0;
      for (int i = 0; i < 16; i++) in_lane[a][i] = 0;
      blocks_done[a] = 0;
      last_out[a] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      run_arch(0);
      run_arch(1);
      run_arch(2);
      run_arch(3);
      run_arch(4);
      run_arch(5);
      run_arch(6);
      run_arch(7);
    join
    for (int a = 0; a < NA; a++) begin
      real mhz;
      // Lowest clock for 30 frames per second, from the block rate alone.
      mhz = 30.0 * real'(NFRAME * 16 / LANES_OF[a]) / 1.0e6;
      checks++;
      if (mhz < PUB_MHZ[a] - 0.01 || mhz > PUB_MHZ[a] + 0.01) begin
        failures++;
        $display("FAIL: %s: %0.2f MHz for 30 fps, published %0.2f", NAME_OF[a], mhz, PUB_MHZ[a]);
      end
      $display("%-9s frame: %0d cycles (%0.3f MHz for 30 fps, published %0.2f MHz); closed loop: %0d cycles per block",
               NAME_OF[a], frame_cycles[a], 30.0 * real'(frame_cycles[a]) / 1.0e6, PUB_MHZ[a],
               loop_cycles[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAME * 8 + NLOOP * 40 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
