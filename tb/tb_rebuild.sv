// tb_rebuild: the rebuild sweep against a behavioural memory. Every burst
// 0..N-1 must be read and then written back with exactly the data read, in
// address order; a burst reported uncorrectable must not be written back;
// done must pulse once at the end and busy must cover the sweep.
module tb_rebuild;
  import cube_pkg::*;
  localparam int N = 12;
  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic [31:0] n_done;
  logic req_valid, req_ready, wdata_valid, wdata_ready, rd_valid, rd_ce, rd_ue, rd_last;
  ctrl_req_t req;
  logic [DATA_W-1:0] wdata, rd_data;
  int checks = 0, failures = 0, dones = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge

  rebuild #(.N_BURSTS(N)) dut (.clk, .rst_n, .start_i(start), .busy_o(busy), .done_o(done),
    .n_done_o(n_done), .req_valid_o(req_valid), .req_o(req), .req_ready_i(req_ready),
    .wdata_valid_o(wdata_valid), .wdata_o(wdata), .wdata_ready_i(wdata_ready),
    .rd_valid_i(rd_valid), .rd_data_i(rd_data), .rd_ce_i(rd_ce), .rd_ue_i(rd_ue),
    .rd_last_i(rd_last));
  tb_mem_responder mem (.clk, .req_valid, .req, .req_ready, .wdata_valid, .wdata, .wdata_ready,
    .rd_valid, .rd_data, .rd_ce, .rd_ue, .rd_last);

  always @(posedge clk) if (done) dones++;

  task automatic chk(bit ok, string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < N; a++)
      for (int b = 0; b < BL; b++) mem.mem[a][b] = {$urandom, $urandom, $urandom, 32'(a)};
    mem.mark_ue(5);
    repeat (3) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    repeat (2) @(posedge clk);
    chk(busy, "busy during sweep");
    wait (dones > 0); repeat (5) @(posedge clk);
    chk(!busy && dones == 1 && n_done == N, "one done pulse, N bursts");
    // expected request sequence: R0 W0 R1 W1 ... R5 (no write) R6 W6 ...
    begin
      int k = 0;
      for (int a = 0; a < N; a++) begin
        chk(k < mem.log_addr.size() && mem.log_addr[k] == a && !mem.log_write[k], $sformatf("read %0d", a));
        k++;
        if (a != 5) begin
          chk(k < mem.log_addr.size() && mem.log_addr[k] == a && mem.log_write[k], $sformatf("write-back %0d", a));
          k++;
        end
      end
      chk(k == mem.log_addr.size(), "no extra requests");
    end
    for (int a = 0; a < N; a++) chk(mem.mem[a][7][31:0] == 32'(a), "data kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
