// tb_ddr_selector: a reset of die 3 holds only its reset_n low for exactly
// RST_CYC cycles and deselects only it; a power cycle of die 12 removes its
// supply for PWR_OFF_CYC cycles and then resets it; done pulses once each.
module tb_ddr_selector;
  import cube_pkg::*;
  localparam int RST = 7, OFF = 13;
  logic clk = 0, rst_n = 1, rv = 0, pwr = 0, rdy;
  logic [3:0] die = 0;
  logic [NUM_DIES-1:0] cs_n, rn, pe, busy, done;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge
  ddr_selector #(.RST_CYC(RST), .PWR_OFF_CYC(OFF)) dut (.clk, .rst_n, .req_valid_i(rv),
    .req_pwr_i(pwr), .req_die_i(die), .req_ready_o(rdy), .cs_n_i(1'b0), .cs_n_o(cs_n),
    .die_reset_n_o(rn), .die_pwr_en_o(pe), .die_busy_o(busy), .die_done_o(done));
  task automatic chk(bit ok, string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  int low_rst [NUM_DIES], low_pwr [NUM_DIES], low_cs [NUM_DIES], ndone [NUM_DIES];
  always @(posedge clk) if (rst_n)
    for (int d = 0; d < NUM_DIES; d++) begin
      if (!rn[d]) low_rst[d]++;
      if (!pe[d]) low_pwr[d]++;
      if (cs_n[d]) low_cs[d]++;
      if (done[d]) ndone[d]++;
    end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (low_rst[d]) begin low_rst[d] = 0; low_pwr[d] = 0; low_cs[d] = 0; ndone[d] = 0; end
    @(posedge clk); rst_n <= 1; @(posedge clk);
    chk(rdy && cs_n == '0 && rn == '1 && pe == '1, "idle: all selected and powered");
    rv <= 1; die <= 3; pwr <= 0; @(posedge clk); rv <= 0;
    repeat (RST + OFF + 10) @(posedge clk);
    pwr <= 1; die <= 12; rv <= 1; @(posedge clk); rv <= 0;
    repeat (RST + OFF + 10) @(posedge clk);
    for (int d = 0; d < NUM_DIES; d++) begin
      int er, ep;
      er = (d == 3) ? RST : (d == 12) ? RST + OFF : 0;
      ep = (d == 12) ? OFF : 0;
      chk(low_rst[d] == er && low_pwr[d] == ep && low_cs[d] == er && ndone[d] == (er ? 1 : 0),
          $sformatf("die %0d: reset %0d power %0d cs %0d done %0d", d, low_rst[d], low_pwr[d], low_cs[d], ndone[d]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
