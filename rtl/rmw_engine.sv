// rmw_engine: read / correct / write-back of one burst, shared by the scrub
// and rebuild logic.
//
// On start_i it requests a read of burst addr_i tagged src_i, captures the 8
// corrected 128-bit beats coming back from the EDAC decoder, and, if any beat
// needed correction (or force_i is set), writes the corrected burst back so it
// is re-encoded. A burst with an uncorrectable error is never written back.
// done_o pulses at the end, wrote_o says whether a write-back happened.
// Request side uses the controller's req/wdata handshakes; read data arrives
// on rd_valid_i for this engine's tag only.
// Entirely this design's helper; the scrub and rebuild behaviour it serves is
// the cube description's.
module rmw_engine
  import cube_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  baddr_t            addr_i,
  input  logic              force_i,
  input  src_e              src_i,
  output logic              busy_o,
  output logic              done_o,
  output logic              wrote_o,
  output logic              ue_o,
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

  typedef enum logic [2:0] {S_IDLE, S_RREQ, S_RWAIT, S_WREQ, S_WDATA} state_e;
  state_e                    state;
  logic [BL-1:0][DATA_W-1:0] buf_q;
  logic [2:0]                beat;
  logic                      ce_acc, ue_acc, force_q;
  baddr_t                    addr_q;
  src_e                      src_q;

  assign busy_o        = (state != S_IDLE);
  assign req_valid_o   = (state == S_RREQ) || (state == S_WREQ);
  assign req_o         = '{write: state == S_WREQ, src: src_q, addr: addr_q};
  assign wdata_valid_o = (state == S_WDATA);
  assign wdata_o       = buf_q[beat];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state   <= S_IDLE;
      beat    <= '0;
      ce_acc  <= 1'b0;
      ue_acc  <= 1'b0;
      force_q <= 1'b0;
      addr_q  <= '0;
      src_q   <= SRC_SCRUB;
      done_o  <= 1'b0;
      wrote_o <= 1'b0;
      ue_o    <= 1'b0;
      buf_q   <= '0;
    end else begin
      done_o <= 1'b0;
      case (state)
        S_IDLE: if (start_i) begin
          addr_q  <= addr_i;
          force_q <= force_i;
          src_q   <= src_i;
          ce_acc  <= 1'b0;
          ue_acc  <= 1'b0;
          beat    <= '0;
          state   <= S_RREQ;
        end
        S_RREQ: if (req_ready_i) state <= S_RWAIT;
        S_RWAIT: if (rd_valid_i) begin
          buf_q[beat] <= rd_data_i;
          beat        <= beat + 1'b1;
          ce_acc      <= ce_acc | rd_ce_i;
          ue_acc      <= ue_acc | rd_ue_i;
          if (rd_last_i) begin
            beat <= '0;
            if ((force_q || ce_acc || rd_ce_i) && !(ue_acc || rd_ue_i)) state <= S_WREQ;
            else begin
              state   <= S_IDLE;
              done_o  <= 1'b1;
              wrote_o <= 1'b0;
              ue_o    <= ue_acc | rd_ue_i;
            end
          end
        end
        S_WREQ: if (req_ready_i) state <= S_WDATA;
        S_WDATA: if (wdata_ready_i) begin
          beat <= beat + 1'b1;
          if (beat == 3'(BL-1)) begin
            state   <= S_IDLE;
            done_o  <= 1'b1;
            wrote_o <= 1'b1;
            ue_o    <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end

endmodule
