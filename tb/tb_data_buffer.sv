// tb_data_buffer: slots are handed out lowest-free first, a burst written
// beat by beat reads back whole from its slot, slots stay reserved until
// freed, allocation stops when all are used and a freed slot is reused.
module tb_data_buffer;
  import cube_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst_n = 1, av, take = 0, we = 0, fr = 0;
  logic [1:0] as, ws = 0, rs = 0, fs = 0;
  logic [2:0] wb = 0;
  logic [CODE_W-1:0] wd = '0;
  logic [BL-1:0][CODE_W-1:0] rb;
  logic [NS-1:0] used;
  logic [BL-1:0][CODE_W-1:0] ref_m [NS];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge
  data_buffer #(.N_SLOT(NS)) dut (.clk, .rst_n, .alloc_valid_o(av), .alloc_slot_o(as),
    .alloc_take_i(take), .wr_en_i(we), .wr_slot_i(ws), .wr_beat_i(wb), .wr_data_i(wd),
    .rd_slot_i(rs), .rd_burst_o(rb), .free_i(fr), .free_slot_i(fs), .used_o(used));
  task automatic chk(bit ok, string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  task automatic fill(int s);
    for (int b = 0; b < BL; b++) begin
      ref_m[s][b] = {7{$urandom}};
      we <= 1; ws <= 2'(s); wb <= 3'(b); wd <= ref_m[s][b]; @(posedge clk);
    end
    we <= 0;
  endtask
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      #0.1 chk(av && as == 2'(s), $sformatf("alloc %0d", s));
      take <= 1; @(posedge clk); take <= 0;
      fill(s);
    end
    #0.1 chk(!av && used == '1, "full");
    for (int s = 0; s < NS; s++) begin rs = 2'(s); #0.1 chk(rb == ref_m[s], $sformatf("burst %0d", s)); end
    fr <= 1; fs <= 2; @(posedge clk); fr <= 0;
    #0.1 chk(av && as == 2 && used == 4'b1011, "slot 2 freed and offered");
    take <= 1; @(posedge clk); take <= 0;
    fill(2);
    rs = 2; #0.1 chk(rb == ref_m[2], "reused slot");
    rs = 1; #0.1 chk(rb == ref_m[1], "other slot intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
