// ddr3_die_model: behavioural command-level model of one DDR3 x16 die as
// seen through the PHY (not synthesizable; test use only).
//
// Decodes {cs_n, ras_n, cas_n, we_n} each clock, keeps the open row of each
// bank, stores whole BL8 bursts (128 bits) in a sparse array indexed by
// {bank, row, burst column}, and returns a read burst READ_LAT cycles after
// RD on rd_valid_o. It checks the command rules the controller must keep:
// ACT only to a closed bank after tRP/tRFC, RD/WR only to an open bank after
// tRCD, PRE only after tRAS, REF only with all banks closed; each breach
// increments violations. Removing power (pwr_en low) loses the contents.
// Test hooks: fail_i makes the die return garbage (a dead die);
// flip_bit() corrupts one stored bit (an upset).
module ddr3_die_model
  import cube_pkg::*;
#(
  parameter int READ_LAT = 6,
  parameter int DIE      = 0
) (
  input  logic               clk,
  input  logic               cke,
  input  logic               cs_n,
  input  logic               ras_n,
  input  logic               cas_n,
  input  logic               we_n,
  input  logic [BA_W-1:0]    ba,
  input  logic [ROW_W-1:0]   addr,
  input  logic               reset_n,
  input  logic               pwr_en,
  input  logic               wr_valid,
  input  logic [BURST_W-1:0] wr_data,
  input  logic               fail_i,
  output logic [BURST_W-1:0] rd_data,
  output logic               rd_valid,
  output int                 violations,
  output int                 n_writes
);

  logic [BURST_W-1:0] mem [logic [BADDR_W-1:0]];
  logic               open_b   [NUM_BANKS];
  logic [ROW_W-1:0]   row_b    [NUM_BANKS];
  longint             t_act    [NUM_BANKS];
  longint             t_pre    [NUM_BANKS];
  longint             t_ref, cyc;
  logic [BURST_W-1:0] pipe_d   [READ_LAT];
  logic               pipe_v   [READ_LAT];

  initial begin
    violations = 0; n_writes = 0; cyc = 0; t_ref = -1000;
    for (int b = 0; b < NUM_BANKS; b++) begin
      open_b[b] = 1'b0; row_b[b] = '0; t_act[b] = -1000; t_pre[b] = -1000;
    end
    for (int i = 0; i < READ_LAT; i++) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end
  end

  function automatic logic [BADDR_W-1:0] key(logic [BA_W-1:0] b, logic [ROW_W-1:0] r,
                                            logic [ROW_W-1:0] a);
    return {r, b, a[COL_W-1:3]};
  endfunction

  function automatic void flip_bit(logic [BA_W-1:0] b, logic [ROW_W-1:0] r,
                                   logic [BCOL_W-1:0] c, int bitpos);
    logic [BADDR_W-1:0] k;
    k = {r, b, c};
    if (mem.exists(k)) mem[k][bitpos] = ~mem[k][bitpos];
  endfunction

  function automatic void bad(string what);
    violations++;
    $display("die %0d: protocol violation at cycle %0d: %s", DIE, cyc, what);
  endfunction

  always @(posedge clk) begin
    logic [BURST_W-1:0] rdv;
    logic               rdo;
    cyc++;
    rdo = 1'b0;
    rdv = '0;
    if (!pwr_en) mem.delete();
    if (!reset_n) for (int b = 0; b < NUM_BANKS; b++) open_b[b] = 1'b0;
    if (pwr_en && reset_n && cke && !cs_n) begin
      case ({ras_n, cas_n, we_n})
        3'b011: begin  // ACT
          if (open_b[ba]) bad("ACT to open bank");
          if (cyc - t_pre[ba] < T_RP) bad("tRP");
          if (cyc - t_ref < T_RFC) bad("tRFC");
          open_b[ba] = 1'b1; row_b[ba] = addr; t_act[ba] = cyc;
        end
        3'b101, 3'b100: begin  // RD / WR
          if (!open_b[ba]) bad("column command to closed bank");
          if (cyc - t_act[ba] < T_RCD) bad("tRCD");
          if (we_n) begin
            rdo = 1'b1;
            rdv = mem.exists(key(ba, row_b[ba], addr)) ? mem[key(ba, row_b[ba], addr)]
                                                       : {8{16'hDEAD ^ 16'(DIE)}};
          end else begin
            if (!wr_valid) bad("WR without data");
            mem[key(ba, row_b[ba], addr)] = wr_data;
            n_writes++;
          end
        end
        3'b010: begin  // PRE
          for (int b = 0; b < NUM_BANKS; b++)
            if (addr[10] || b == int'(ba)) begin
              if (open_b[b] && cyc - t_act[b] < T_RAS) bad("tRAS");
              if (open_b[b]) t_pre[b] = cyc;
              open_b[b] = 1'b0;
            end
        end
        3'b001: begin  // REF
          for (int b = 0; b < NUM_BANKS; b++) begin
            if (open_b[b]) bad("REF with open bank");
            if (cyc - t_pre[b] < T_RP) bad("tRP before REF");
          end
          t_ref = cyc;
        end
        default: ;
      endcase
    end
    for (int i = READ_LAT-1; i > 0; i--) begin
      pipe_v[i] = pipe_v[i-1];
      pipe_d[i] = pipe_d[i-1];
    end
    pipe_v[0] = rdo;
    pipe_d[0] = rdv;
    rd_valid <= pipe_v[READ_LAT-1];
    rd_data  <= fail_i ? BURST_W'({$urandom, $urandom, $urandom, $urandom}) : pipe_d[READ_LAT-1];
  end

endmodule
