// tb_request_queues: random pushes into per-bank queues and random pops,
// checked against a reference queue per bank (order, head contents, full
// and empty flags).
module tb_request_queues;
  import cube_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 1, push = 0, empty;
  logic [2:0] pb = 0;
  q_entry_t pe = '0;
  logic [7:0] rdy, hv, pop = '0;
  q_entry_t [7:0] head;
  q_entry_t refq [8][$];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge
  request_queues #(.DEPTH(D)) dut (.clk, .rst_n, .push_i(push), .push_bank_i(pb),
    .push_entry_i(pe), .ready_o(rdy), .head_valid_o(hv), .head_o(head), .pop_i(pop),
    .empty_o(empty));
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      bit all_empty;
      // compare state before the edge
      #0.1;
      all_empty = 1;
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (hv[b] != (refq[b].size() > 0) || rdy[b] != (refq[b].size() < D) ||
            (hv[b] && head[b] != refq[b][0])) begin
          failures++; $display("FAIL t=%0d bank %0d", t, b);
        end
        if (refq[b].size() > 0) all_empty = 0;
      end
      checks++; if (empty != all_empty) failures++;
      push = ($urandom_range(2) != 0);
      pb   = 3'($urandom_range(7));
      pe   = q_entry_t'({$urandom, $urandom});
      for (int b = 0; b < 8; b++) pop[b] = ($urandom_range(3) == 0);
      #0.1;
      begin
        bit take;
        take = push && rdy[pb];
        @(posedge clk);
        for (int b = 0; b < 8; b++) if (pop[b] && refq[b].size() > 0) void'(refq[b].pop_front());
        if (take) refq[pb].push_back(pe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
