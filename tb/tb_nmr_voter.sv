// tb_nmr_voter: TMR majority (checked bit by bit by counting ones), XOR
// parity and pass-through modes, the disagree flags, and the one-cycle
// latency from valid_i to valid_o.
module tb_nmr_voter;
  import cube_pkg::*;
  logic clk = 0, rst_n = 1, vi = 0, vo;
  logic [1:0] mode;
  logic [DATA_W-1:0] a, b, c, y;
  logic [2:0] dis;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge
  nmr_voter dut (.clk, .rst_n, .mode_i(mode), .valid_i(vi), .local_i(a), .peer0_i(b),
                 .peer1_i(c), .valid_o(vo), .data_o(y), .disagree_o(dis));
  function automatic logic [DATA_W-1:0] r128(); return {$urandom, $urandom, $urandom, $urandom}; endfunction
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [DATA_W-1:0] e;
    logic [2:0] ed;
    repeat (2) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      mode = 2'(t % 3);
      a = r128(); b = (t % 5 == 0) ? a : r128(); c = (t % 7 == 0) ? a : r128();
      if (t % 11 == 0) begin b = a; c = a; end
      for (int i = 0; i < DATA_W; i++) e[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      ed = {c != e, b != e, a != e};
      if (mode == 2) e = a ^ b ^ c;
      if (mode == 0) e = a;
      if (mode != 1) ed = 0;
      vi <= 1;
      @(posedge clk);
      vi <= 0;
      #0.1;
      checks++;
      if (!vo || y != e || dis != ed) begin
        failures++; $display("FAIL t=%0d mode %0d vo %b dis %b/%b", t, mode, vo, dis, ed);
      end
      @(posedge clk); #0.1;
      checks++;
      if (vo) begin failures++; $display("FAIL valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
