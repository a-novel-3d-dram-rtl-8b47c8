// data_buffer: slot buffer holding write bursts until they are issued.
//
// A write request claims a free slot (alloc_*), its BL code-word beats are
// written one per cycle into that slot, and the slot stays reserved until the
// DRAM write command has taken the whole burst, when free_* releases it. The
// burst read port is combinational so the write command and its data leave in
// the same cycle. Slot allocation is lowest-free-index.
// Holding data until the request is serviced is the cube description's; slot
// count and allocation are this design's choices.
module data_buffer
  import cube_pkg::*;
#(
  parameter int N_SLOT = 8,
  parameter int WIDTH = CODE_W,
  parameter int BEATS = BL
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // allocation
  output logic                       alloc_valid_o,
  output logic [$clog2(N_SLOT)-1:0]   alloc_slot_o,
  input  logic                       alloc_take_i,
  // beat write
  input  logic                       wr_en_i,
  input  logic [$clog2(N_SLOT)-1:0]   wr_slot_i,
  input  logic [$clog2(BEATS)-1:0]   wr_beat_i,
  input  logic [WIDTH-1:0]           wr_data_i,
  // burst read and release
  input  logic [$clog2(N_SLOT)-1:0]   rd_slot_i,
  output logic [BEATS-1:0][WIDTH-1:0] rd_burst_o,
  input  logic                       free_i,
  input  logic [$clog2(N_SLOT)-1:0]   free_slot_i,
  output logic [N_SLOT-1:0]           used_o
);

  logic [BEATS-1:0][WIDTH-1:0] mem [N_SLOT];

  always_comb begin
    alloc_valid_o = 1'b0;
    alloc_slot_o  = '0;
    for (int s = N_SLOT-1; s >= 0; s--)
      if (!used_o[s]) begin
        alloc_valid_o = 1'b1;
        alloc_slot_o  = ($clog2(N_SLOT))'(s);
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) used_o <= '0;
    else begin
      if (free_i) used_o[free_slot_i] <= 1'b0;
      if (alloc_take_i && alloc_valid_o) used_o[alloc_slot_o] <= 1'b1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mem <= '{default: '0};
    else if (wr_en_i) mem[wr_slot_i][wr_beat_i] <= wr_data_i;

  assign rd_burst_o = mem[rd_slot_i];

endmodule
