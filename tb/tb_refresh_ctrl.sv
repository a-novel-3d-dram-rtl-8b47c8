// tb_refresh_ctrl: one refresh owed per interval; requests retired by ack;
// with no ack the debt saturates at 8 and raises urgent; a shorter interval
// doubles the rate.
module tb_refresh_ctrl;
  logic clk = 0, rst_n = 1, ack = 0, req, urg;
  logic [15:0] ivl = 16'd50;
  logic [3:0] owed;
  int checks = 0, failures = 0, acks = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge
  refresh_ctrl dut (.clk, .rst_n, .interval_i(ivl), .ref_ack_i(ack), .ref_req_o(req),
                    .urgent_o(urg), .owed_o(owed));
  task automatic chk(bit ok, string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  // auto acknowledge, as the controller would
  bit auto_ack = 1;
  always @(posedge clk) begin
    ack <= auto_ack && req && !ack;
    if (ack) acks++;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t;
    @(posedge clk); rst_n <= 1;
    t = 0;
    while (!req) begin @(posedge clk); t++; end
    chk(t == 50 || t == 51, $sformatf("first request after one interval (%0d)", t));
    acks = 0;
    repeat (1000) @(posedge clk);
    chk(acks == 20, $sformatf("20 refreshes in 1000 cycles at 50 (%0d)", acks));
    ivl = 16'd25; acks = 0;
    repeat (1000) @(posedge clk);
    chk(acks >= 39 && acks <= 41, $sformatf("40 refreshes at 25 (%0d)", acks));
    auto_ack = 0;
    repeat (3) @(posedge clk);
    while (owed != 1) @(posedge clk);
    repeat (25 * 6 + 5) @(posedge clk);
    chk(owed == 7 && !urg, $sformatf("7 owed (%0d)", owed));
    repeat (25 * 5) @(posedge clk);
    chk(owed == 8 && urg, "saturates at 8, urgent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
