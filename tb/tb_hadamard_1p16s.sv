// tb_hadamard_1p16s: self-checking testbench of hadamard_1p16s.
//
// Drives whole 4x4 blocks, with random idle cycles between some of them and
// runs of back-to-back blocks, and compares every result block with a
// reference computed directly from the matrix definition Y = H*W*H/2. Each
// result must appear exactly 0 cycle(s) after its input block (0 means in
// the same cycle, through combinational logic), which also checks one block
// per cycle when blocks come back to back.
module tb_hadamard_1p16s;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned IN_W = 13;
  localparam int LAT   = 0;
  localparam int NBLK  = 400;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  in_valid = 1'b0;
  logic [15:0][IN_W-1:0] in_w = '0;
  logic                  out_valid;
  logic [15:0][IN_W+2:0] out_s;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int n_b2b = 0;      // blocks that directly followed another block

  typedef struct {
    int s [16];
    int t;
  } exp_t;
  exp_t expq [$];

  hadamard_1p16s dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_w      (in_w),
    .out_valid (out_valid),
    .out_s     (out_s)
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
  // Driver: inputs change just after a rising edge; outputs are checked at
  // the falling edge of the same cycle.
  initial begin
    int w [16];
    exp_t e;
    bit prev;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    prev = 1'b0;
    for (int n = 0; n < NBLK; n++) begin
      @(posedge clk);
      #1;
      if (n > 5 && $urandom_range(3) == 0) begin
        in_valid = 1'b0;
        prev = 1'b0;
        @(posedge clk);
        #1;
      end
      make_block(n, w);
      for (int i = 0; i < 16; i++) in_w[i] = w[i][IN_W-1:0];
      in_valid = 1'b1;
      if (prev) n_b2b++;
      prev = 1'b1;
      ref_hadamard(w, e.s);
      e.t = cyc;
      expq.push_back(e);
    end
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d result blocks never appeared", expq.size());
    end
    checks++;
    if (n_b2b == 0) begin
      failures++;
      $display("FAIL: no back-to-back blocks were driven");
    end
    $display("back-to-back blocks: %0d", n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result at cycle %0d", cyc);
      end else begin
        e = expq.pop_front();
        if (cyc - e.t != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cyc - e.t, LAT);
        end
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (int'($signed(out_s[i])) != e.s[i]) begin
            failures++;
            if (failures < 20)
              $display("FAIL: S%0d = %0d, expected %0d", i, $signed(out_s[i]), e.s[i]);
          end
        end
      end
    end
  end

  // Watchdog
  initial begin
    repeat (20 * NBLK + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
