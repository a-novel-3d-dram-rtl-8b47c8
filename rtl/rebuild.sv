// rebuild: whole-array read/write sweep that restores a replaced or
// power-cycled die.
//
// On start_i, every burst address from 0 to N_BURSTS-1 is read through the
// EDAC and written back corrected (rmw_engine with force set). While the
// lost die still holds garbage, the code corrects its two bits per block; the
// write-back then stores correct data and parity on it (or on the spare die
// that replaced it). busy_o is high during the sweep, done_o pulses at its end.
// A single state machine serves whichever die is steered in, as the cube
// description has it; the sweep order is this design's.
module rebuild
  import cube_pkg::*;
#(
  parameter longint N_BURSTS = 64'(1) << BADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  output logic              busy_o,
  output logic              done_o,
  output logic [31:0]       n_done_o,
  output logic              req_valid_o,
  output ctrl_req_t         req_o,
  input  logic              req_ready_i,
  output logic              wdata_valid_o,
  output logic [DATA_W-1:0] wdata_o,
  input  logic              wdata_ready_i,
  input  logic              rd_valid_i,
  input  logic [DATA_W-1:0] rd_data_i,
  input  logic              rd_ce_i,
  input  logic              rd_ue_i,
  input  logic              rd_last_i
);

  logic [BADDR_W-1:0] addr;
  logic               running, issued, eng_busy, eng_done;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      running  <= 1'b0;
      issued   <= 1'b0;
      addr     <= '0;
      done_o   <= 1'b0;
      n_done_o <= '0;
    end else begin
      done_o <= 1'b0;
      if (!running) begin
        if (start_i) begin
          running <= 1'b1;
          addr    <= '0;
          issued  <= 1'b0;
        end
      end else if (!issued) issued <= 1'b1;
      else if (eng_done) begin
        n_done_o <= n_done_o + 1;
        issued   <= 1'b0;
        addr     <= addr + 1'b1;
        if (64'(addr) == N_BURSTS - 1) begin
          running <= 1'b0;
          done_o  <= 1'b1;
        end
      end
    end

  assign busy_o = running;

  rmw_engine u_rmw (
    .clk, .rst_n, .start_i(running && !issued && !eng_busy), .addr_i(baddr_t'(addr)),
    .force_i(1'b1), .src_i(SRC_REBUILD),
    .busy_o(eng_busy), .done_o(eng_done), .wrote_o(), .ue_o(),
    .req_valid_o, .req_o, .req_ready_i, .wdata_valid_o, .wdata_o, .wdata_ready_i,
    .rd_valid_i, .rd_data_i, .rd_ce_i, .rd_ue_i, .rd_last_i
  );

endmodule
