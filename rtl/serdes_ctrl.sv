// serdes_ctrl: packet layer between the serial links and the controller.
//
// The SerDes deserialises each link into 32-bit words. A host packet starts
// with a request word host_req_t {op, cube id, burst address}; a write is
// followed by 32 data words (8 beats x 4 words, low word first); a
// configuration write (OP_CFG) carries {register[25:20], value[19:0]} in its
// address field. Packets whose cube id is not this cube's are forwarded
// unchanged on the chain link to the next cube; id 4'hF is a broadcast that
// is executed locally and forwarded, which is how chained cubes run in lock
// step. Locally, the request word appears on req_o/vld_req_o and every
// assembled 128-bit beat on write_data_o/vld_data_o, each held until accepted.
// Read data returns as 8 corrected beats on read_corrected_data_i/vld_read_i;
// it is buffered and sent to the host as a response packet: a header word
// {8'hA5, 14'b0, ue, ce, cube id, 4'b0} followed by 32 data words. Response
// packets arriving on the chain link (also 33 words) are passed on to the
// host between local responses. A new local read is only issued when the
// response buffer is free.
// Chaining through a serial link is the cube description's; the packet and
// word formats are this design's own (the physical SerDes is outside).
module serdes_ctrl
  import cube_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CUBE_W-1:0]  my_id_i,
  // host link, receive / transmit
  input  logic               rx_valid_i,
  input  logic [31:0]        rx_data_i,
  output logic               rx_ready_o,
  output logic               tx_valid_o,
  output logic [31:0]        tx_data_o,
  input  logic               tx_ready_i,
  // chain link to the next cube
  output logic               ctx_valid_o,
  output logic [31:0]        ctx_data_o,
  input  logic               ctx_ready_i,
  input  logic               crx_valid_i,
  input  logic [31:0]        crx_data_i,
  output logic               crx_ready_o,
  // controller side
  output logic [31:0]        req_o,
  output logic               vld_req_o,
  input  logic               req_ready_i,
  output logic [DATA_W-1:0]  write_data_o,
  output logic               vld_data_o,
  input  logic               data_ready_i,
  input  logic [DATA_W-1:0]  read_corrected_data_i,
  input  logic               vld_read_i,
  input  logic               rd_correctable_err_i,
  input  logic               rd_uncorrectable_err_i,
  output logic               cfg_we_o,
  output logic [5:0]         cfg_addr_o,
  output logic [19:0]        cfg_wdata_o
);

  localparam int WORDS = BL * DATA_W / 32;   // 32 data words per burst

  // ---------------- receive side ----------------
  typedef enum logic [2:0] {R_HDR, R_REQ, R_DATA, R_BEAT} rstate_e;
  rstate_e     rst;
  host_req_t   hdr, in_hdr;
  logic        loc, fwd;
  logic [1:0]  wsel;
  logic [2:0]  bcnt;
  logic        rsp_busy;
  logic        word_ok, hdr_loc, hdr_fwd;

  assign in_hdr  = host_req_t'(rx_data_i);
  assign hdr_loc = (in_hdr.cube == my_id_i) || (in_hdr.cube == '1);
  assign hdr_fwd = (in_hdr.cube != my_id_i);

  // a word is taken when the chain (if forwarding) can take it too
  always_comb begin
    rx_ready_o  = 1'b0;
    ctx_valid_o = 1'b0;
    ctx_data_o  = rx_data_i;
    case (rst)
      R_HDR: begin
        rx_ready_o  = !hdr_fwd || in_hdr.op == OP_NOP || ctx_ready_i;
        ctx_valid_o = rx_valid_i && hdr_fwd && in_hdr.op != OP_NOP;
      end
      R_DATA: begin
        rx_ready_o  = !fwd || ctx_ready_i;
        ctx_valid_o = rx_valid_i && fwd;
      end
      default: ;
    endcase
  end
  assign word_ok = rx_valid_i && rx_ready_o;

  assign vld_req_o = (rst == R_REQ) && (hdr.op != OP_READ || !rsp_busy);
  assign req_o     = hdr;
  assign vld_data_o = (rst == R_BEAT);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rst <= R_HDR; hdr <= '0; loc <= 1'b0; fwd <= 1'b0; wsel <= '0; bcnt <= '0;
      write_data_o <= '0; cfg_we_o <= 1'b0; cfg_addr_o <= '0; cfg_wdata_o <= '0;
    end else begin
      cfg_we_o <= 1'b0;
      case (rst)
        R_HDR: if (word_ok) begin
          hdr  <= in_hdr;
          loc  <= hdr_loc;
          fwd  <= hdr_fwd;
          wsel <= '0;
          bcnt <= '0;
          case (in_hdr.op)
            OP_READ:  if (hdr_loc) rst <= R_REQ;
            OP_WRITE: rst <= hdr_loc ? R_REQ : R_DATA;
            OP_CFG: if (hdr_loc) begin
              cfg_we_o    <= 1'b1;
              cfg_addr_o  <= in_hdr.addr[25:20];
              cfg_wdata_o <= in_hdr.addr[19:0];
            end
            default: ;
          endcase
        end
        R_REQ: if (vld_req_o && req_ready_i) rst <= (hdr.op == OP_WRITE) ? R_DATA : R_HDR;
        R_DATA: if (word_ok) begin
          write_data_o[wsel*32 +: 32] <= rx_data_i;
          wsel <= wsel + 1'b1;
          if (wsel == 2'd3) begin
            if (loc) rst <= R_BEAT;
            else begin
              bcnt <= bcnt + 1'b1;
              if (bcnt == 3'(BL-1)) rst <= R_HDR;
            end
          end
        end
        R_BEAT: if (data_ready_i) begin
          bcnt <= bcnt + 1'b1;
          rst  <= (bcnt == 3'(BL-1)) ? R_HDR : R_DATA;
        end
        default: rst <= R_HDR;
      endcase
    end

  // ---------------- transmit side ----------------
  typedef enum logic [1:0] {T_IDLE, T_LOCAL, T_CHAIN} tstate_e;
  tstate_e                    tst;
  logic [BL-1:0][DATA_W-1:0]  rsp;
  logic [2:0]                 rbeat;
  logic                       rsp_full, rce, rue;
  logic [5:0]                 widx;     // 0 = header, 1..32 = data

  always_comb begin
    tx_valid_o  = 1'b0;
    tx_data_o   = '0;
    crx_ready_o = 1'b0;
    case (tst)
      T_LOCAL: begin
        tx_valid_o = 1'b1;
        tx_data_o  = (widx == '0) ? {8'hA5, 14'd0, rue, rce, my_id_i, 4'd0}
                                  : rsp[3'((widx - 6'd1) >> 2)][((widx - 6'd1) & 6'd3) * 32 +: 32];
      end
      T_CHAIN: begin
        tx_valid_o  = crx_valid_i;
        tx_data_o   = crx_data_i;
        crx_ready_o = tx_ready_i;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tst <= T_IDLE; rsp <= '0; rbeat <= '0; rsp_full <= 1'b0; rsp_busy <= 1'b0;
      rce <= 1'b0; rue <= 1'b0; widx <= '0;
    end else begin
      if (vld_req_o && req_ready_i && hdr.op == OP_READ) rsp_busy <= 1'b1;
      if (vld_read_i) begin
        rsp[rbeat] <= read_corrected_data_i;
        rbeat      <= rbeat + 1'b1;
        rce        <= (rbeat == '0) ? rd_correctable_err_i   : (rce | rd_correctable_err_i);
        rue        <= (rbeat == '0) ? rd_uncorrectable_err_i : (rue | rd_uncorrectable_err_i);
        if (rbeat == 3'(BL-1)) rsp_full <= 1'b1;
      end
      case (tst)
        T_IDLE: begin
          widx <= '0;
          if (rsp_full) tst <= T_LOCAL;
          else if (crx_valid_i) tst <= T_CHAIN;
        end
        T_LOCAL: if (tx_ready_i) begin
          widx <= widx + 1'b1;
          if (widx == 6'(WORDS)) begin
            tst      <= T_IDLE;
            rsp_full <= 1'b0;
            rsp_busy <= 1'b0;
          end
        end
        T_CHAIN: if (crx_valid_i && tx_ready_i) begin
          widx <= widx + 1'b1;
          if (widx == 6'(WORDS)) tst <= T_IDLE;
        end
        default: tst <= T_IDLE;
      endcase
    end

endmodule
