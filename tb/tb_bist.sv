// tb_bist: built-in self test against a behavioural memory. A clean run over
// 10 bursts must write the documented pattern (checked against an
// independent computation), read all bursts back and pass. A second run with
// one burst corrupted between the phases must report one failure and log
// its address; a burst flagged correctable is logged as a fault location.
// A zeroise run must leave zeros.
module tb_bist;
  import cube_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst_n = 1, start = 0, zero = 0, busy, done, log_valid;
  logic [31:0] n_fail, n_ce;
  diag_rec_t log_rec;
  logic req_valid, req_ready, wdata_valid, wdata_ready, rd_valid, rd_ce, rd_ue, rd_last;
  ctrl_req_t req;
  logic [DATA_W-1:0] wdata, rd_data;
  int checks = 0, failures = 0, nlog = 0;
  int logged [$];
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge

  bist dut (.clk, .rst_n, .start_i(start), .zeroize_i(zero), .seed_i(32'hC0FFEE11),
    .n_bursts_i(BADDR_W'(N)), .busy_o(busy), .done_o(done), .n_fail_o(n_fail), .n_ce_o(n_ce),
    .log_valid_o(log_valid), .log_o(log_rec),
    .req_valid_o(req_valid), .req_o(req), .req_ready_i(req_ready),
    .wdata_valid_o(wdata_valid), .wdata_o(wdata), .wdata_ready_i(wdata_ready),
    .rd_valid_i(rd_valid), .rd_data_i(rd_data), .rd_ce_i(rd_ce), .rd_ue_i(rd_ue),
    .rd_last_i(rd_last));
  tb_mem_responder mem (.clk, .req_valid, .req, .req_ready, .wdata_valid, .wdata, .wdata_ready,
    .rd_valid, .rd_data, .rd_ce, .rd_ue, .rd_last);

  always @(posedge clk) if (log_valid) logged.push_back(int'(log_rec.addr));

  task automatic chk(bit ok, string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  function automatic logic [31:0] pw(int a, int b, int k);
    longint v;
    v = longint'(a) * 64'h9E3779B1 + longint'(b) * 64'h85EBCA6B + longint'(k) * 64'h27D4EB2F;
    return v[31:0] ^ 32'hC0FFEE11;
  endfunction

  task automatic run();
    start <= 1; @(posedge clk); start <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit ok;
    repeat (3) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    run();
    chk(n_fail == 0 && logged.size() == 0, "clean run passes");
    ok = 1;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < BL; b++)
        for (int k = 0; k < 4; k++) if (mem.mem[a][b][k*32 +: 32] != pw(a, b, k)) ok = 0;
    chk(ok, "pattern written");
    chk(mem.log_addr.size() == 2 * N, "one write and one read per burst");
    // corrupt burst 4 once the write phase is over, flag burst 7 correctable
    fork
      run();
      begin
        wait (mem.log_addr.size() == 2 * N + N);   // all writes of the second run done
        mem.mem[4][3][9] = ~mem.mem[4][3][9];
        mem.mark_ce(7);
      end
    join
    chk(n_fail == 1, $sformatf("one miscompare (%0d)", n_fail));
    chk(n_ce == 1, "one corrected burst");
    chk(logged.size() == 2 && logged[0] == 4 && logged[1] == 7, "fault locations logged");
    zero = 1;
    run();
    ok = 1;
    for (int a = 0; a < N; a++) if (mem.mem[a] != '0) ok = 0;
    chk(ok && n_fail == 0, "zeroised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
