// tb_hadamard_2p4s_2p2: self-checking testbench of hadamard_2p4s_2p2.
//
// Streams 4x4 blocks into the design, LANES samples per beat in row-major
// order, and compares every output beat with a reference computed directly
// from the matrix definition Y = H*W*H/2. Blocks come in three kinds: back to
// back with no idle cycle, after an idle gap, and with idle cycles between
// their own beats. Every output beat must appear exactly in the cycle the
// pipeline timing gives (N*(B-1)+1 cycles after the block's last input beat,
// N = 16/LANES beats per block, B = 2 barriers), so an unbroken block
// comes out N*B cycles after its first beat and blocks follow every N
// cycles; out_last must mark the last beat of each block.
module tb_hadamard_2p4s_2p2;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned IN_W  = 13;
  localparam int          LANES = 4;
  localparam int          N     = 16 / LANES;
  localparam int          NBAR  = 2;
  localparam int          LAT   = N * NBAR;
  localparam int          NBLK  = 300;

  logic                        clk = 1'b0;
  logic                        rst_n = 1'b0;
  logic                        in_valid = 1'b0;
  logic [LANES-1:0][IN_W-1:0]  in_data = '0;
  logic                        out_valid;
  logic                        out_last;
  logic [LANES-1:0][IN_W+2:0]  out_data;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int n_b2b = 0;       // blocks whose first beat followed the previous block's last
  int n_gap = 0;       // blocks with idle cycles between their own beats
  int n_lat = 0;       // unbroken blocks whose latency was measured

  typedef struct {
    int s [LANES];
    int t;             // cycle in which this beat must appear
    bit last;
    int t_first_in;    // first input beat of the block, -1 if it had gaps
  } beat_t;
  beat_t expq [$];

  hadamard_2p4s_2p2 dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (in_data),
    .out_valid (out_valid),
    .out_last  (out_last),
    .out_data  (out_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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
  initial begin
    int w [16];
    int s [16];
    int t_first, t_last, prev_last;
    int mode;
    bit gapped;
    beat_t e;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    prev_last = -10;
    for (int n = 0; n < NBLK; n++) begin
      make_block(n, w);
      ref_hadamard(w, s);
      mode = (n < 6) ? 0 : int'($urandom_range(3));
      gapped = 1'b0;
      @(posedge clk);
      #1;
      if (mode == 1) begin
        in_valid = 1'b0;
        repeat ($urandom_range(1, 2 * N)) @(posedge clk);
        #1;
      end
      for (int j = 0; j < N; j++) begin
        if (j > 0) begin
          @(posedge clk);
          #1;
          if (mode == 2 && $urandom_range(1) == 1) begin
            in_valid = 1'b0;
            gapped = 1'b1;
            repeat ($urandom_range(1, 3)) @(posedge clk);
            #1;
          end
        end
        for (int k = 0; k < LANES; k++) in_data[k] = w[LANES * j + k][IN_W-1:0];
        in_valid = 1'b1;
        if (j == 0) t_first = cyc;
        if (j == N - 1) t_last = cyc;
      end
      if (t_first == prev_last + 1) n_b2b++;
      if (gapped) n_gap++;
      prev_last = t_last;
      for (int j = 0; j < N; j++) begin
        for (int k = 0; k < LANES; k++) e.s[k] = s[LANES * j + k];
        e.t = t_last + 1 + N * (NBAR - 1) + j;
        e.last = (j == N - 1);
        e.t_first_in = (j == 0 && !gapped) ? t_first : -1;
        expq.push_back(e);
      end
    end
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d output beats never appeared", expq.size());
    end
    checks += 3;
    if (n_b2b == 0) begin
      failures++;
      $display("FAIL: no back-to-back blocks");
    end
    if (n_gap == 0) begin
      failures++;
      $display("FAIL: no block with gaps between its beats");
    end
    if (n_lat == 0) begin
      failures++;
      $display("FAIL: latency never measured");
    end
    $display("blocks: back-to-back %0d, with inner gaps %0d, latency measured %0d",
             n_b2b, n_gap, n_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: every output beat, compared at the falling edge.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      beat_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output beat at cycle %0d", cyc);
      end else begin
        e = expq.pop_front();
        if (cyc != e.t) begin
          failures++;
          if (failures < 20)
            $display("FAIL: beat at cycle %0d, expected cycle %0d", cyc, e.t);
        end
        checks++;
        if (out_last != e.last) begin
          failures++;
          $display("FAIL: out_last = %0b at cycle %0d", out_last, cyc);
        end
        if (e.t_first_in >= 0) begin
          n_lat++;
          checks++;
          if (cyc - e.t_first_in != LAT) begin
            failures++;
            $display("FAIL: latency %0d, expected %0d", cyc - e.t_first_in, LAT);
          end
        end
        for (int k = 0; k < LANES; k++) begin
          checks++;
          if (int'($signed(out_data[k])) != e.s[k]) begin
            failures++;
            if (failures < 20)
              $display("FAIL: cycle %0d lane %0d = %0d, expected %0d",
                       cyc, k, $signed(out_data[k]), e.s[k]);
          end
        end
      end
    end
  end

  // Watchdog
  initial begin
    repeat (NBLK * (6 * N + 4) + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
