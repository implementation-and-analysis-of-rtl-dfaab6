// tb_hadamard_pingpong: self-checking testbench of hadamard_pingpong.
//
// Writes blocks of sixteen random words, LANES words per cycle at scrambled
// positions, and swaps the banks with the last write of each block. While
// the next block is being written, the read bank must show the previous
// block unchanged, every cycle; writes to the other bank must never leak
// into it. Some blocks have idle cycles between writes, others follow the
// previous block with no idle cycle.
module tb_hadamard_pingpong;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W     = 17;
  localparam int unsigned LANES = 4;
  localparam int          N     = 16 / LANES;
  localparam int          NBLK  = 200;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    wr_en = 1'b0;
  logic [LANES-1:0][3:0]   wr_idx = '0;
  logic [LANES-1:0][W-1:0] wr_data = '0;
  logic                    swap = 1'b0;
  logic [15:0][W-1:0]      rd_data;

  int checks = 0;
  int failures = 0;
  int n_idle = 0;

  logic [15:0][W-1:0] shown;   // what the read bank must hold
  logic [15:0][W-1:0] filling; // what the write bank is receiving
  bit                 shown_ok = 1'b0;

  // Default sizes: 17-bit words, four lanes.
  hadamard_pingpong dut (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (wr_en),
    .wr_idx  (wr_idx),
    .wr_data (wr_data),
    .swap    (swap),
    .rd_data (rd_data)
  );

  always #5 clk = ~clk;

  // The read bank is compared every cycle once a block has been swapped in.
  always @(negedge clk)
    if (rst_n && shown_ok) begin
      checks++;
      if (rd_data !== shown) begin
        failures++;
        if (failures < 10) $display("FAIL: read bank %h, expected %h", rd_data, shown);
      end
    end

  initial begin
    int perm [16];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < NBLK; n++) begin
      // Random order of the sixteen positions.
      for (int i = 0; i < 16; i++) perm[i] = i;
      perm.shuffle();
      for (int j = 0; j < N; j++) begin
        @(posedge clk);
        #1;
        swap  = 1'b0;
        wr_en = 1'b0;
        // The previous block has just been swapped in.
        if (j == 0 && n > 0) begin
          shown    = filling;
          shown_ok = 1'b1;
        end
        if (n > 2 && $urandom_range(3) == 0) begin
          n_idle++;
          @(posedge clk);
          #1;
        end
        wr_en = 1'b1;
        for (int k = 0; k < LANES; k++) begin
          wr_idx[k]  = 4'(perm[LANES * j + k]);
          wr_data[k] = W'($urandom);
          filling[perm[LANES * j + k]] = wr_data[k];
        end
        swap = (j == N - 1);
      end
    end
    @(posedge clk);
    #1;
    wr_en = 1'b0;
    swap  = 1'b0;
    shown = filling;
    repeat (3) @(posedge clk);
    checks++;
    if (n_idle == 0) begin
      failures++;
      $display("FAIL: no idle cycles between writes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 4 * N + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
