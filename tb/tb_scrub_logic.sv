// tb_scrub_logic: background scrubbing against a behavioural memory.
// Row scope: the 128 bursts of the chosen row/bank are read in order, one per
// interval, and only bursts flagged correctable are written back, with the
// data read. Bank scope: the row advances after the last column. Checks the
// pacing (no two reads closer than the interval) and the counters.
module tb_scrub_logic;
  import cube_pkg::*;
  localparam int IVL = 40;
  logic clk = 0, rst_n = 1, en = 0;
  logic [1:0] scope = 0;
  logic [31:0] n_scr, n_cor, n_pass;
  logic req_valid, req_ready, wdata_valid, wdata_ready, rd_valid, rd_ce, rd_ue, rd_last;
  ctrl_req_t req;
  logic [DATA_W-1:0] wdata, rd_data;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge

  scrub_logic #(.ROWS(4)) dut (.clk, .rst_n, .en_i(en), .scope_i(scope), .interval_i(IVL),
    .bank_i(3'd5), .row_i(16'd9), .n_scrubbed_o(n_scr), .n_corrected_o(n_cor),
    .n_passes_o(n_pass),
    .req_valid_o(req_valid), .req_o(req), .req_ready_i(req_ready),
    .wdata_valid_o(wdata_valid), .wdata_o(wdata), .wdata_ready_i(wdata_ready),
    .rd_valid_i(rd_valid), .rd_data_i(rd_data), .rd_ce_i(rd_ce), .rd_ue_i(rd_ue),
    .rd_last_i(rd_last));
  tb_mem_responder mem (.clk, .req_valid, .req, .req_ready, .wdata_valid, .wdata, .wdata_ready,
    .rd_valid, .rd_data, .rd_ce, .rd_ue, .rd_last);

  task automatic chk(bit ok, string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  function automatic int ba(int row, int bank, int col);
    return (row << 10) | (bank << 7) | col;
  endfunction

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nr;
    for (int c = 0; c < 128; c++)
      for (int b = 0; b < BL; b++) mem.mem[ba(9, 5, c)][b] = {$urandom, $urandom, $urandom, $urandom};
    mem.mark_ce(ba(9, 5, 3));
    mem.mark_ce(ba(9, 5, 100));
    repeat (3) @(posedge clk); rst_n = 1;
    en = 1;
    wait (n_pass == 1);
    en = 0;
    repeat (50) @(posedge clk);
    chk(n_scr == 128 && n_cor == 2, $sformatf("row pass: scrubbed %0d corrected %0d", n_scr, n_cor));
    nr = 0;
    for (int k = 0; k < mem.log_addr.size(); k++) begin
      if (!mem.log_write[k]) begin
        chk(mem.log_addr[k] == ba(9, 5, nr), $sformatf("read order %0d", nr));
        if (nr > 0) chk(mem.log_time[k] - mem.log_time[k-1-(mem.log_write[k-1] ? 1 : 0)] >= IVL, "pacing");
        nr++;
      end else
        chk(mem.log_addr[k] == ba(9, 5, 3) || mem.log_addr[k] == ba(9, 5, 100), "write only where corrected");
    end
    chk(!mem.ce_mark.exists(ba(9, 5, 3)) && !mem.ce_mark.exists(ba(9, 5, 100)), "corrected bursts rewritten");
    // bank scope: after 128 bursts the next row of bank 5 follows
    mem.log_addr.delete(); mem.log_write.delete(); mem.log_time.delete();
    scope = 1;
    en = 1;
    wait (n_scr == 128 + 130);
    en = 0;
    repeat (200) @(posedge clk);
    chk(mem.log_addr[0] == ba(0, 5, 0) || mem.log_addr[0] == ba(1, 5, 0), "bank scope start");
    chk(mem.log_addr[128] == mem.log_addr[0] + 1024, "bank scope next row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
