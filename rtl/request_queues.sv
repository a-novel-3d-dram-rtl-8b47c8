// request_queues: one FIFO of pending requests per DRAM bank.
//
// A request is pushed into the queue of its bank and stays there, with its
// row, column, direction, source and arrival time stamp, until the scheduler
// picks the head of that queue and pops it. Each queue is a DEPTH-entry
// circular buffer; ready_o[b] is low when queue b is full. The heads of all
// queues are visible at once, which is what the FR-FCFS scheduler looks at.
// Per-bank queues are the cube description's; the depth is this design's.
module request_queues
  import cube_pkg::*;
#(
  parameter int NB    = NUM_BANKS,
  parameter int DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  push_i,
  input  logic [$clog2(NB)-1:0] push_bank_i,
  input  q_entry_t              push_entry_i,
  output logic [NB-1:0]         ready_o,
  output logic [NB-1:0]         head_valid_o,
  output q_entry_t [NB-1:0]     head_o,
  input  logic [NB-1:0]         pop_i,
  output logic                  empty_o
);

  localparam int PW = $clog2(DEPTH);
  q_entry_t         q     [NB][DEPTH];
  logic [PW-1:0]    rd_p  [NB];
  logic [PW-1:0]    wr_p  [NB];
  logic [PW:0]      count [NB];

  logic [NB-1:0] push_b, pop_b;
  always_comb
    for (int b = 0; b < NB; b++) begin
      push_b[b] = push_i && (push_bank_i == ($clog2(NB))'(b)) && ready_o[b];
      pop_b[b]  = pop_i[b] && head_valid_o[b];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int b = 0; b < NB; b++) begin
        for (int i = 0; i < DEPTH; i++) q[b][i] <= '0;
        rd_p[b]  <= '0;
        wr_p[b]  <= '0;
        count[b] <= '0;
      end
    end else begin
      for (int b = 0; b < NB; b++) begin
        if (push_b[b]) begin
          q[b][wr_p[b]] <= push_entry_i;
          wr_p[b]       <= PW'(wr_p[b] + 1'b1);
        end
        if (pop_b[b]) rd_p[b] <= PW'(rd_p[b] + 1'b1);
        count[b] <= count[b] + (PW+1)'(push_b[b]) - (PW+1)'(pop_b[b]);
      end
    end

  always_comb begin
    empty_o = 1'b1;
    for (int b = 0; b < NB; b++) begin
      ready_o[b]      = (count[b] != (PW+1)'(DEPTH));
      head_valid_o[b] = (count[b] != '0);
      head_o[b]       = q[b][rd_p[b]];
      if (head_valid_o[b]) empty_o = 1'b0;
    end
  end

endmodule
