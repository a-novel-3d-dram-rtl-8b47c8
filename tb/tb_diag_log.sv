// tb_diag_log: random pushes and pops against a reference queue; checks the
// head record, the count, overflow dropping and the logged/dropped counters.
module tb_diag_log;
  import cube_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 1, push = 0, pop = 0, valid;
  diag_rec_t rec, head;
  logic [$clog2(D):0] count;
  logic [31:0] n_log, n_drop;
  diag_rec_t ref_q[$];
  int checks = 0, failures = 0, exp_log = 0, exp_drop = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge
  diag_log #(.DEPTH(D)) dut (.clk, .rst_n, .push_i(push), .rec_i(rec), .pop_i(pop),
    .valid_o(valid), .head_o(head), .count_o(count), .n_logged_o(n_log), .n_dropped_o(n_drop));
  task automatic chk(bit ok, string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rec = '0;
    @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      bit p, q;
      // phases: fill past full, then drain, then mixed
      p = (t < 600) ? ($urandom_range(3) != 0) : (t < 1200) ? ($urandom_range(4) == 0) : $urandom_range(1);
      q = (t < 600) ? ($urandom_range(5) == 0) : (t < 1200) ? ($urandom_range(3) != 0) : $urandom_range(1);
      push <= p; pop <= q; rec <= diag_rec_t'({$urandom, $urandom});
      #0.1;
      chk(valid == (ref_q.size() > 0) && 32'(count) == ref_q.size(), $sformatf("count t=%0d", t));
      if (ref_q.size() > 0) chk(head == ref_q[0], $sformatf("head t=%0d", t));
      @(posedge clk);
      begin
        bit popped;
        popped = q && ref_q.size() > 0;
        if (popped) void'(ref_q.pop_front());
        if (p) begin
          exp_log++;
          if (ref_q.size() < D) ref_q.push_back(rec);
          else exp_drop++;
        end
      end
    end
    push <= 0; pop <= 0;
    @(posedge clk); #0.1;
    chk(n_log == exp_log, $sformatf("logged %0d exp %0d", n_log, exp_log));
    chk(n_drop == exp_drop && exp_drop > 0, $sformatf("dropped %0d exp %0d", n_drop, exp_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
