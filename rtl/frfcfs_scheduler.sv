// frfcfs_scheduler: First-Ready First-Come First-Serve pick among bank queues.
//
// Looks at the head request of every bank queue. Requests that are "ready",
// i.e. hit the row already open in their bank, go first; among them, and
// otherwise among all heads, the oldest one (largest now - time stamp,
// modulo 2^TS_W) wins. This keeps open-page hits streaming while older misses
// are still served in arrival order. Combinational; grant_o is one-hot.
// FR-FCFS itself is named by the cube description; applying it to queue heads
// only and the time-stamp age measure are this design's choices.
module frfcfs_scheduler
  import cube_pkg::*;
#(
  parameter int NB = NUM_BANKS
) (
  input  logic [TS_W-1:0]           now_i,
  input  logic [NB-1:0]             head_valid_i,
  input  q_entry_t [NB-1:0]         head_i,
  input  logic [NB-1:0]             bank_open_i,
  input  logic [NB-1:0][ROW_W-1:0]  open_row_i,
  output logic                      grant_valid_o,
  output logic [$clog2(NB)-1:0]     grant_bank_o,
  output logic                      grant_hit_o
);

  always_comb begin
    logic [TS_W-1:0] best_age, age;
    logic            hit, best_hit;
    grant_valid_o = 1'b0;
    grant_bank_o  = '0;
    grant_hit_o   = 1'b0;
    best_age      = '0;
    best_hit      = 1'b0;
    for (int b = 0; b < NB; b++) begin
      hit = bank_open_i[b] && (open_row_i[b] == head_i[b].row);
      age = now_i - head_i[b].ts;
      if (head_valid_i[b] &&
          (!grant_valid_o || (hit && !best_hit) || (hit == best_hit && age > best_age))) begin
        grant_valid_o = 1'b1;
        grant_bank_o  = ($clog2(NB))'(b);
        grant_hit_o   = hit;
        best_hit      = hit;
        best_age      = age;
      end
    end
  end

endmodule
