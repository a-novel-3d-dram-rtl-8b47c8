// tb_bank_spiral: every logical bank, spiral on and off, against the rule
// die d gets (bank + d) mod 8; with the spiral on, the 8 data dies must use
// 8 different banks for one word.
module tb_bank_spiral;
  import cube_pkg::*;
  logic en;
  logic [BA_W-1:0] bank;
  logic [NUM_DIES-1:0][BA_W-1:0] db;
  int checks = 0, failures = 0;
  bank_spiral dut (.spiral_en_i(en), .bank_i(bank), .die_bank_o(db));
  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int e = 0; e < 2; e++)
      for (int b = 0; b < 8; b++) begin
        bit seen [8];
        en = e[0]; bank = 3'(b); #1;
        foreach (seen[i]) seen[i] = 0;
        for (int d = 0; d < NUM_DIES; d++) begin
          checks++;
          if (int'(db[d]) != (e ? (b + d) % 8 : b)) begin
            failures++; $display("FAIL en=%0d bank=%0d die=%0d got %0d", e, b, d, db[d]);
          end
          if (d < 8) seen[db[d]] = 1;
        end
        if (e) begin
          checks++;
          foreach (seen[i]) if (!seen[i]) begin failures++; $display("FAIL bank %0d unused", i); break; end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
