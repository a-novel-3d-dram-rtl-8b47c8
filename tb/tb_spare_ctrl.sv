// tb_spare_ctrl: lane steering before and after a swap, the error-count
// threshold, the forced swap and the single-spare rule.
module tb_spare_ctrl;
  import cube_pkg::*;
  localparam int TH = 5;
  logic clk = 0, rst_n = 1, ev = 0, force_s = 0, active, swap;
  logic [NUM_LANES-1:0] le = '0;
  logic [3:0] fl = '0, lane;
  logic [NUM_LANES-1:0][BURST_W-1:0] lwr, lrd;
  logic [NUM_DIES-1:0][BURST_W-1:0] dwr, drd;
  int checks = 0, failures = 0, swaps = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge
  always @(posedge clk) if (swap) swaps++;
  spare_ctrl #(.THRESH(TH)) dut (.clk, .rst_n, .err_valid_i(ev), .lane_err_i(le),
    .force_i(force_s), .force_lane_i(fl), .active_o(active), .lane_o(lane), .swap_o(swap),
    .lane_wr_i(lwr), .die_wr_o(dwr), .die_rd_i(drd), .lane_rd_o(lrd));
  task automatic chk(bit ok, string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  task automatic steer(int rl);
    for (int k = 0; k < 20; k++) begin
      for (int l = 0; l < NUM_LANES; l++) lwr[l] = {4{$urandom}};
      for (int d = 0; d < NUM_DIES; d++) drd[d] = {4{$urandom}};
      #0.1;
      for (int l = 0; l < NUM_LANES; l++) begin
        chk(dwr[l] == lwr[l], "write lane to own die");
        chk(lrd[l] == (l == rl ? drd[NUM_DIES-1] : drd[l]), $sformatf("read lane %0d", l));
      end
      chk(dwr[NUM_DIES-1] == (rl >= 0 ? lwr[rl] : '0), "spare die write");
    end
  endtask
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); rst_n <= 1; @(posedge clk);
    steer(-1);
    // lane 9 errors, below the threshold, with lane 3 errors interleaved
    for (int k = 0; k < TH - 1; k++) begin
      ev <= 1; le <= 13'(1) << 9 | ((k % 2) ? 13'(1) << 3 : 13'(0)); @(posedge clk);
    end
    ev <= 0; le <= '0;
    repeat (3) @(posedge clk);
    #0.1 chk(!active && swaps == 0, "no swap below threshold");
    ev <= 1; le <= 13'(1) << 9; @(posedge clk); ev <= 0; le <= '0;
    repeat (2) @(posedge clk); #0.1;
    chk(active && lane == 9 && swaps == 1, "swap of lane 9 at threshold");
    steer(9);
    // a second request is ignored: only one spare
    force_s <= 1; fl <= 4; @(posedge clk); force_s <= 0;
    repeat (TH + 2) begin ev <= 1; le <= 13'(1) << 3; @(posedge clk); end
    ev <= 0; le <= '0;
    repeat (2) @(posedge clk); #0.1;
    chk(active && lane == 9 && swaps == 1, "spare used only once");
    // forced swap after reset, out-of-range lane ignored
    rst_n <= 0; @(posedge clk); rst_n <= 1; swaps = 0;
    force_s <= 1; fl <= 14; @(posedge clk); force_s <= 0;
    @(posedge clk); #0.1 chk(!active, "lane 14 refused");
    force_s <= 1; fl <= 0; @(posedge clk); force_s <= 0;
    repeat (2) @(posedge clk); #0.1 chk(active && lane == 0 && swaps == 1, "forced swap of lane 0");
    steer(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
