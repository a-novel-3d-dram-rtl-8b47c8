// tb_bank_manager: the DDR3 intervals after each command, cycle by cycle:
// ACT -> column command after tRCD, ACT -> PRE after tRAS, WR -> PRE after
// write recovery, PRE -> ACT after tRP, REF -> ACT after tRFC; open-row
// tracking and precharge-all.
module tb_bank_manager;
  import cube_pkg::*;
  logic clk = 0, rst_n = 1, all = 0, idle;
  ddr_cmd_e cmd = CMD_NOP;
  logic [2:0] bank = 0;
  logic [ROW_W-1:0] row = 0;
  logic [7:0] open, ca, crw, cp;
  logic [7:0][ROW_W-1:0] orow;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge
  bank_manager dut (.clk, .rst_n, .cmd_i(cmd), .all_i(all), .bank_i(bank), .row_i(row),
    .open_o(open), .open_row_o(orow), .can_act_o(ca), .can_rw_o(crw), .can_pre_o(cp),
    .all_idle_o(idle));
  task automatic chk(bit ok, string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  task automatic issue(ddr_cmd_e c, int b, int r = 0, bit a = 0);
    cmd <= c; bank <= 3'(b); row <= 16'(r); all <= a;
    @(posedge clk);
    cmd <= CMD_NOP; all <= 0;
  endtask
  task automatic wait_for(ref logic [7:0] v, input int b, output int n);
    n = 1;
    #0.1;
    while (!v[b]) begin @(posedge clk); #0.1; n++; end
  endtask
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    @(posedge clk); rst_n <= 1; @(posedge clk);
    #0.1 chk(ca == '1 && crw == '0 && cp == '1 && idle, "reset: all closed");
    issue(CMD_ACT, 2, 77);
    #0.1 chk(open == 8'b100 && orow[2] == 77 && !ca[2] && !cp[2], "bank 2 open on row 77");
    wait_for(crw, 2, n); chk(n == T_RCD, $sformatf("tRCD %0d", n));
    wait_for(cp, 2, n);  chk(n + T_RCD - 1 == T_RAS, $sformatf("tRAS %0d", n + T_RCD - 1));
    issue(CMD_WR, 2);
    #0.1 chk(!cp[2], "write recovery blocks PRE");
    wait_for(cp, 2, n); chk(n == T_WR, $sformatf("tWR %0d", n));
    issue(CMD_PRE, 2);
    #0.1 chk(!open[2] && !ca[2], "closed, tRP running");
    wait_for(ca, 2, n); chk(n == T_RP, $sformatf("tRP %0d", n));
    issue(CMD_ACT, 1, 5); issue(CMD_ACT, 6, 9);
    repeat (T_RAS + 2) @(posedge clk);
    issue(CMD_PRE, 0, 0, 1);
    #0.1 chk(open == '0, "precharge all");
    repeat (T_RP) @(posedge clk);
    issue(CMD_REF, 0, 0, 1);
    #0.1 chk(!idle && ca == '0, "refresh blocks ACT");
    wait_for(ca, 4, n); chk(n == T_RFC, $sformatf("tRFC %0d", n));
    #0.1 chk(idle, "idle after tRFC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
