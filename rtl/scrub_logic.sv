// scrub_logic: continuous background scrubbing at a programmable rate.
//
// Every interval_i cycles (when enabled) one burst is read through the EDAC;
// if a correctable error is found the corrected burst is written back, so
// single upsets cannot build up into uncorrectable ones. The swept range is
// chosen by scope_i: 0 = one row (all bursts of row row_i in bank bank_i),
// 1 = one bank (every row of bank_i), 2/3 = the whole die stack. The sweep
// wraps around and restarts, counting completed passes. Uses rmw_engine for the
// access itself.
// Continuous scrubbing at a programmable rate with row/bank/die scope is the
// cube description's; the one-burst-per-interval pacing is this design's.
module scrub_logic
  import cube_pkg::*;
#(
  parameter int ROWS = 1 << ROW_W      // rows swept in bank / whole scope
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i,
  input  logic [1:0]        scope_i,
  input  logic [31:0]       interval_i,
  input  logic [BA_W-1:0]   bank_i,
  input  logic [ROW_W-1:0]  row_i,
  output logic [31:0]       n_scrubbed_o,
  output logic [31:0]       n_corrected_o,
  output logic [31:0]       n_passes_o,
  // controller access
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

  logic [31:0]       timer;
  baddr_t            cur;
  logic              start, busy, done, wrote, ue;
  logic [BCOL_W-1:0] col;
  logic [ROW_W-1:0]  row;
  logic [BA_W-1:0]   bank;

  always_comb begin
    cur = '{row: row, bank: bank, col: col};
    if (scope_i == 2'd0) begin
      cur.row  = row_i;
      cur.bank = bank_i;
    end else if (scope_i == 2'd1) cur.bank = bank_i;
  end

  assign start = en_i && !busy && timer >= interval_i;

  logic col_wrap, row_wrap;
  assign col_wrap = (col == '1);
  assign row_wrap = col_wrap && (32'(row) == ROWS - 1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      timer <= '0; col <= '0; row <= '0; bank <= '0;
      n_scrubbed_o <= '0; n_corrected_o <= '0; n_passes_o <= '0;
    end else begin
      if (start) timer <= '0;
      else if (en_i && timer != '1) timer <= timer + 1;
      if (done) begin
        n_scrubbed_o <= n_scrubbed_o + 1;
        if (wrote) n_corrected_o <= n_corrected_o + 1;
        col      <= col + 1'b1;
        if (col_wrap) row <= row_wrap ? '0 : row + 1'b1;
        case (scope_i)
          2'd0:    if (col_wrap) n_passes_o <= n_passes_o + 1;
          2'd1:    if (row_wrap) n_passes_o <= n_passes_o + 1;
          default: if (row_wrap) begin
            bank <= bank + 1'b1;
            if (bank == '1) n_passes_o <= n_passes_o + 1;
          end
        endcase
      end
    end

  rmw_engine u_rmw (
    .clk, .rst_n, .start_i(start), .addr_i(cur), .force_i(1'b0), .src_i(SRC_SCRUB),
    .busy_o(busy), .done_o(done), .wrote_o(wrote), .ue_o(ue),
    .req_valid_o, .req_o, .req_ready_i, .wdata_valid_o, .wdata_o, .wdata_ready_i,
    .rd_valid_i, .rd_data_i, .rd_ce_i, .rd_ue_i, .rd_last_i
  );

endmodule
