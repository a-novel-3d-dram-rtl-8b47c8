// diag_log: diagnostic log of error events.
//
// A DEPTH-entry FIFO of diag_rec_t records (source, burst address, corrected /
// uncorrectable / miscompare flags, lanes that held corrected bits), written by
// the EDAC read path, the scrubber, the rebuild sweep and BIST. The host reads
// the oldest record on head_o and removes it with pop_i. When full, new
// records are dropped and counted in n_dropped_o; n_logged_o counts all
// records offered.
// Keeping addresses and characteristics of the errors found is the cube
// description's; depth and drop policy are this design's.
module diag_log
  import cube_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push_i,
  input  diag_rec_t              rec_i,
  input  logic                   pop_i,
  output logic                   valid_o,
  output diag_rec_t              head_o,
  output logic [$clog2(DEPTH):0] count_o,
  output logic [31:0]            n_logged_o,
  output logic [31:0]            n_dropped_o
);

  localparam int PW = $clog2(DEPTH);
  diag_rec_t     mem [DEPTH];
  logic [PW-1:0] rp, wp;
  logic          do_push, do_pop;

  assign valid_o = (count_o != '0);
  assign head_o  = mem[rp];
  assign do_pop  = pop_i && valid_o;
  assign do_push = push_i && (count_o != (PW+1)'(DEPTH) || do_pop);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rp <= '0; wp <= '0; count_o <= '0; n_logged_o <= '0; n_dropped_o <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count_o <= count_o + (PW+1)'(do_push) - (PW+1)'(do_pop);
      if (push_i) n_logged_o <= n_logged_o + 1;
      if (push_i && !do_push) n_dropped_o <= n_dropped_o + 1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    else if (do_push) mem[wp] <= rec_i;

endmodule
