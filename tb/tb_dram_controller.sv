// tb_dram_controller: the controller driving 13 behavioural DDR3 die models
// (one per coded lane) with random reads and writes over a small set of
// rows and banks, so that row hits, row conflicts and bank parallelism all
// occur. Every read burst is compared with a reference memory; the die models
// count DDR3 timing and protocol breaches, which must stay at zero. The run
// covers the open-page policy, the close-page policy, a shortened refresh
// interval (refresh count checked against elapsed time) and power-down with
// CKE low during idle periods.
module tb_dram_controller;
  import cube_pkg::*;
  logic clk = 0, rst_n = 1;
  logic close_page = 0, pd_en = 0;
  logic [15:0] pd_idle = 16'd20, ref_int = 16'(T_REFI);
  logic req_valid = 0, req_ready, wdv = 0, wdr, busy, rdv, rlast, idle;
  ctrl_req_t req = '0;
  logic [CODE_W-1:0] wd = '0, rd;
  src_e rsrc;
  baddr_t raddr;
  ddr_cmd_e cmd;
  logic [BA_W-1:0] cbank;
  logic [ROW_W-1:0] caddr;
  logic cke, wr_valid;
  logic [NUM_LANES-1:0][BURST_W-1:0] wr_lanes, rd_lanes;
  logic [NUM_LANES-1:0] die_rdv;
  logic [31:0] n_hit, n_act, n_pre, n_ref, n_pd;
  int viol [NUM_LANES];
  int nwr [NUM_LANES];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge

  dram_controller dut (.clk, .rst_n, .close_page_i(close_page), .pd_en_i(pd_en),
    .pd_idle_i(pd_idle), .ref_interval_i(ref_int),
    .req_valid_i(req_valid), .req_i(req), .req_ready_o(req_ready),
    .wdata_valid_i(wdv), .wdata_i(wd), .wdata_ready_o(wdr), .busy_o(busy),
    .rdata_valid_o(rdv), .rdata_o(rd), .rdata_src_o(rsrc), .rdata_addr_o(raddr),
    .rdata_last_o(rlast), .idle_o(idle),
    .cmd_o(cmd), .cmd_bank_o(cbank), .cmd_addr_o(caddr), .cke_o(cke),
    .wr_valid_o(wr_valid), .wr_lanes_o(wr_lanes), .rd_valid_i(die_rdv[0]), .rd_lanes_i(rd_lanes),
    .n_hit_o(n_hit), .n_act_o(n_act), .n_pre_o(n_pre), .n_ref_o(n_ref), .n_pd_o(n_pd));

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_die
    ddr3_die_model #(.DIE(l)) u_die (.clk, .cke, .cs_n(cmd[3]), .ras_n(cmd[2]), .cas_n(cmd[1]),
      .we_n(cmd[0]), .ba(cbank), .addr(caddr), .reset_n(rst_n), .pwr_en(1'b1),
      .wr_valid, .wr_data(wr_lanes[l]), .fail_i(1'b0), .rd_data(rd_lanes[l]),
      .rd_valid(die_rdv[l]), .violations(viol[l]), .n_writes(nwr[l]));
  end

  typedef logic [BL-1:0][CODE_W-1:0] burst_t;
  burst_t ref_mem [logic [BADDR_W-1:0]];
  burst_t exp_q [logic [BADDR_W-1:0]][$];
  int outstanding = 0, n_reads = 0, n_cke_low = 0;
  logic [BADDR_W-1:0] written[$];

  task automatic chk(bit ok, string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  // read return monitor
  burst_t got;
  int beat = 0;
  always @(posedge clk) if (rst_n) begin
    if (!cke) n_cke_low++;
    if (rdv) begin
      got[beat] = rd;
      chk(rsrc == SRC_SCRUB, "source tag returned");
      chk(rlast == (beat == BL - 1), "last beat flag");
      beat = (beat + 1) % BL;
      if (beat == 0) begin
        logic [BADDR_W-1:0] a;
        a = raddr;
        chk(exp_q.exists(a) && exp_q[a].size() > 0 && got == exp_q[a][0],
            $sformatf("read data at %h t=%0t", a, $time));
        if (exp_q.exists(a) && exp_q[a].size() > 0 && got != exp_q[a][0])
          for (int k = 0; k < BL; k++) $display("  beat %0d got %h exp %h", k, got[k], exp_q[a][0][k]);
        if (exp_q.exists(a) && exp_q[a].size() > 0) void'(exp_q[a].pop_front());
        outstanding--;
        n_reads++;
      end
    end
  end

  function automatic baddr_t rnd_addr();
    baddr_t a;
    a.row  = 16'($urandom_range(2));
    a.bank = 3'($urandom_range(3));
    a.col  = 7'($urandom_range(5));
    return a;
  endfunction

  task automatic do_write(baddr_t a);
    burst_t b;
    for (int k = 0; k < BL; k++) b[k] = {7{$urandom}};
    @(negedge clk);
    req_valid = 1; req = '{write: 1'b1, src: SRC_SCRUB, addr: a};
    #0.2;
    while (!req_ready) begin @(negedge clk); #0.2; end
    @(negedge clk);
    req_valid = 0;
    for (int k = 0; k < BL; k++) begin
      wdv = 1; wd = b[k];
      #0.2;
      while (!wdr) begin @(negedge clk); #0.2; end
      @(negedge clk);
    end
    wdv = 0;
    if (!ref_mem.exists(a)) written.push_back(a);
    ref_mem[a] = b;
  endtask

  task automatic do_read(baddr_t a);
    @(negedge clk);
    req_valid = 1; req = '{write: 1'b0, src: SRC_SCRUB, addr: a};
    #0.2;
    while (!req_ready) begin @(negedge clk); #0.2; end
    @(negedge clk);
    req_valid = 0;
    exp_q[a].push_back(ref_mem[a]);
    outstanding++;
  endtask

  task automatic traffic(int n);
    for (int i = 0; i < n; i++) begin
      if (written.size() == 0 || $urandom_range(1)) do_write(rnd_addr());
      else do_read(written[$urandom_range(written.size() - 1)]);
      if ($urandom_range(7) == 0) repeat ($urandom_range(30)) @(posedge clk);
    end
    wait (outstanding == 0);
    repeat (20) @(posedge clk);
  endtask

  function automatic int total_viol();
    int s = 0;
    foreach (viol[l]) s += viol[l];
    return s;
  endfunction

  initial begin
    #4000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int hit0, pre0, ref0, act0, t0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    // open page
    traffic(400);
    chk(n_hit > 50 && n_act > 10, $sformatf("open page: hits %0d acts %0d", n_hit, n_act));
    chk(total_viol() == 0, "no timing breaches (open page)");
    // close page: every access activates, so no row hits
    close_page <= 1;
    repeat (50) @(posedge clk);
    hit0 = n_hit; act0 = n_act;
    traffic(200);
    chk(n_hit == hit0, $sformatf("close page: no hits (%0d)", n_hit - hit0));
    chk(n_act - act0 >= 200 / 2 - 10, "close page: one activate per access");
    chk(total_viol() == 0, "no timing breaches (close page)");
    // shorter refresh interval while idle
    close_page <= 0;
    ref_int <= 16'd400;
    repeat (1000) @(posedge clk);
    ref0 = n_ref; t0 = 20000;
    repeat (t0) @(posedge clk);
    chk(n_ref - ref0 >= t0 / 400 - 1 && n_ref - ref0 <= t0 / 400 + 1,
        $sformatf("refresh rate %0d in %0d cycles", n_ref - ref0, t0));
    // traffic under frequent refresh
    traffic(200);
    chk(total_viol() == 0, "no timing breaches (frequent refresh)");
    // power-down when idle
    ref_int <= 16'(T_REFI);
    pd_en <= 1;
    repeat (3 * T_REFI) @(posedge clk);
    chk(n_pd >= 3 && n_cke_low > 2 * T_REFI, $sformatf("power-down entries %0d, cke low %0d", n_pd, n_cke_low));
    traffic(100);
    chk(total_viol() == 0, "no timing breaches (power-down)");
    chk(n_reads > 100, $sformatf("reads checked %0d", n_reads));
    for (int k = 0; k < 500 && !idle; k++) @(posedge clk);
    chk(idle, "controller idle at end");
    $display("hits %0d acts %0d pres %0d refs %0d pd %0d reads %0d", n_hit, n_act, n_pre, n_ref, n_pd, n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
