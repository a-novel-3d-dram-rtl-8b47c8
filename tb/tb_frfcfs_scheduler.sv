// tb_frfcfs_scheduler: random queue heads, open rows and time stamps; the
// grant is checked against a reference FR-FCFS choice: among heads hitting an
// open row the oldest, otherwise the oldest of all (age = now - stamp mod 256).
module tb_frfcfs_scheduler;
  import cube_pkg::*;
  logic [TS_W-1:0] now;
  logic [7:0] hv, bo;
  q_entry_t [7:0] head;
  logic [7:0][ROW_W-1:0] orow;
  logic gv, gh;
  logic [2:0] gb;
  int checks = 0, failures = 0, hit_wins = 0;
  frfcfs_scheduler dut (.now_i(now), .head_valid_i(hv), .head_i(head), .bank_open_i(bo),
    .open_row_i(orow), .grant_valid_o(gv), .grant_bank_o(gb), .grant_hit_o(gh));
  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 5000; t++) begin
      int best, best_age, age;
      bit best_hit, any_hit;
      now = 8'($urandom);
      hv = 8'($urandom); bo = 8'($urandom);
      for (int b = 0; b < 8; b++) begin
        head[b] = q_entry_t'({$urandom, $urandom});
        head[b].row = 16'($urandom_range(3));
        orow[b] = 16'($urandom_range(3));
        // distinct ages so the choice is unique
        head[b].ts = 8'(now - 8'(b * 29 + t % 7 + 1));
      end
      best = -1; best_age = -1; any_hit = 0;
      for (int b = 0; b < 8; b++) if (hv[b] && bo[b] && orow[b] == head[b].row) any_hit = 1;
      for (int b = 0; b < 8; b++) begin
        bit h;
        h = bo[b] && orow[b] == head[b].row;
        age = int'(8'(now - head[b].ts));
        if (hv[b] && (h || !any_hit) && age > best_age) begin best = b; best_age = age; best_hit = h; end
      end
      #1;
      checks++;
      if (gv != (best >= 0) || (best >= 0 && (int'(gb) != best || gh != best_hit))) begin
        failures++; $display("FAIL t=%0d got %0d exp %0d", t, gb, best);
      end
      if (best >= 0 && best_hit) hit_wins++;
    end
    checks++;
    if (hit_wins == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
