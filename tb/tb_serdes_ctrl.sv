// tb_serdes_ctrl: packet layer of cube 2 with random back-pressure on every
// link. A random packet stream (local, remote and broadcast reads, writes and
// configuration writes, NOPs) goes in on the host link, and response packets
// of a downstream cube come in on the chain link. Checked against reference
// queues: requests and write beats presented to the controller, configuration
// writes, words forwarded on the chain, and response packets (local, with
// header flags, and passed-through chain responses) on the host link.
module tb_serdes_ctrl;
  import cube_pkg::*;
  localparam logic [3:0] ME = 4'd2, DOWN = 4'd5;
  logic clk = 0, rst_n = 1;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 0;
  logic [31:0] rx_data = '0, tx_data, ctx_data, crx_data = '0, req;
  logic ctx_valid, ctx_ready = 0, crx_valid = 0, crx_ready;
  logic vld_req, req_ready = 0, vld_data, data_ready = 0;
  logic [DATA_W-1:0] wdata, rdata = '0;
  logic vld_read = 0, rce = 0, rue = 0, cfg_we;
  logic [5:0] cfg_addr;
  logic [19:0] cfg_wdata;
  int checks = 0, failures = 0;
  logic [31:0] rxq[$], crxq[$], exp_ctx[$], exp_req[$], exp_cfg[$], exp_chain[$], exp_loc[$];
  logic [DATA_W-1:0] exp_beat[$];
  int n_rd = 0, n_tx_loc = 0, n_tx_chain = 0;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset before the first clock edge

  serdes_ctrl dut (.clk, .rst_n, .my_id_i(ME),
    .rx_valid_i(rx_valid), .rx_data_i(rx_data), .rx_ready_o(rx_ready),
    .tx_valid_o(tx_valid), .tx_data_o(tx_data), .tx_ready_i(tx_ready),
    .ctx_valid_o(ctx_valid), .ctx_data_o(ctx_data), .ctx_ready_i(ctx_ready),
    .crx_valid_i(crx_valid), .crx_data_i(crx_data), .crx_ready_o(crx_ready),
    .req_o(req), .vld_req_o(vld_req), .req_ready_i(req_ready),
    .write_data_o(wdata), .vld_data_o(vld_data), .data_ready_i(data_ready),
    .read_corrected_data_i(rdata), .vld_read_i(vld_read),
    .rd_correctable_err_i(rce), .rd_uncorrectable_err_i(rue),
    .cfg_we_o(cfg_we), .cfg_addr_o(cfg_addr), .cfg_wdata_o(cfg_wdata));

  task automatic chk(bit ok, string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  // host and chain receive drivers
  always @(posedge clk) begin
    if (rx_valid && rx_ready) void'(rxq.pop_front());
    if (crx_valid && crx_ready) void'(crxq.pop_front());
  end
  always @(negedge clk) begin
    rx_valid = rxq.size() > 0 && $urandom_range(7) != 0;
    rx_data  = rxq.size() > 0 ? rxq[0] : '0;
    crx_valid = crxq.size() > 0 && $urandom_range(3) != 0;
    crx_data  = crxq.size() > 0 ? crxq[0] : '0;
    tx_ready = $urandom_range(3) != 0;
    ctx_ready = $urandom_range(2) != 0;
    req_ready = $urandom_range(1);
    data_ready = $urandom_range(2) != 0;
  end

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (ctx_valid && ctx_ready) begin
      chk(exp_ctx.size() > 0 && ctx_data == exp_ctx[0], "chain word");
      if (exp_ctx.size() > 0) void'(exp_ctx.pop_front());
    end
    if (cfg_we) begin
      chk(exp_cfg.size() > 0 && {cfg_addr, cfg_wdata} == exp_cfg[0][25:0], "cfg write");
      if (exp_cfg.size() > 0) void'(exp_cfg.pop_front());
    end
    if (vld_data && data_ready) begin
      chk(exp_beat.size() > 0 && wdata == exp_beat[0], "write beat");
      if (exp_beat.size() > 0) void'(exp_beat.pop_front());
    end
  end

  // controller stand-in: accepts requests, answers reads with 8 beats
  int pend_rd = 0;
  always @(posedge clk) if (rst_n && vld_req && req_ready) begin
    chk(exp_req.size() > 0 && req == exp_req[0], "request word");
    if (exp_req.size() > 0) void'(exp_req.pop_front());
    if (req[31:30] == 2'(OP_READ)) pend_rd++;
  end
  initial begin
    forever begin
      @(posedge clk);
      if (pend_rd > 0) begin
        logic e_ce, e_ue;
        pend_rd--;
        e_ce = 0; e_ue = 0;
        repeat ($urandom_range(1, 20)) @(posedge clk);
        exp_loc.push_back({8'hA5, 14'd0, 1'b0, 1'b0, ME, 4'd0});
        for (int b = 0; b < BL; b++) begin
          @(negedge clk);
          vld_read = 1; rdata = {4{$urandom}}; rce = $urandom_range(7) == 0; rue = $urandom_range(15) == 0;
          e_ce |= rce; e_ue |= rue;
          for (int w = 0; w < 4; w++) exp_loc.push_back(rdata[w*32 +: 32]);
        end
        exp_loc[exp_loc.size() - 33][9:8] = {e_ue, e_ce};
        @(negedge clk); vld_read = 0;
        n_rd++;
      end
    end
  end

  // host transmit monitor: split packets by cube id in the header
  initial begin
    int left;
    bit from_chain;
    left = 0; from_chain = 0;
    forever begin
      @(posedge clk);
      if (rst_n && tx_valid && tx_ready) begin
        if (left == 0) begin
          from_chain = tx_data[7:4] != ME;
          left = 33;
          if (from_chain) n_tx_chain++; else n_tx_loc++;
        end
        if (from_chain) begin
          chk(exp_chain.size() > 0 && tx_data == exp_chain[0], "chain response word");
          if (exp_chain.size() > 0) void'(exp_chain.pop_front());
        end else begin
          chk(exp_loc.size() > 0 && tx_data == exp_loc[0], $sformatf("local response word %h exp %h left %0d", tx_data, exp_loc[0], left));
          if (exp_loc.size() > 0) void'(exp_loc.pop_front());
        end
        left--;
      end
    end
  end

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n_pkt;
    n_pkt = 300;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < n_pkt; p++) begin
      host_req_t h;
      logic [3:0] ids[4] = '{ME, DOWN, 4'hF, 4'd7};
      bit loc, fwd;
      h.op   = op_e'($urandom_range(3));
      h.cube = ids[$urandom_range(3)];
      h.addr = 26'($urandom);
      loc = h.cube == ME || h.cube == 4'hF;
      fwd = h.cube != ME && h.op != OP_NOP;
      rxq.push_back(h);
      if (fwd) exp_ctx.push_back(h);
      if (loc && (h.op == OP_READ || h.op == OP_WRITE)) exp_req.push_back(h);
      if (loc && h.op == OP_CFG) exp_cfg.push_back(h);
      if (h.op == OP_WRITE) begin
        logic [DATA_W-1:0] beat;
        for (int b = 0; b < BL; b++) begin
          beat = {4{$urandom}};
          for (int w = 0; w < 4; w++) begin
            rxq.push_back(beat[w*32 +: 32]);
            if (fwd) exp_ctx.push_back(beat[w*32 +: 32]);
          end
          if (loc) exp_beat.push_back(beat);
        end
      end
      // a downstream cube's response now and then
      if ($urandom_range(9) == 0) begin
        crxq.push_back({8'hA5, 14'd0, 2'b01, DOWN, 4'd0});
        exp_chain.push_back({8'hA5, 14'd0, 2'b01, DOWN, 4'd0});
        for (int w = 0; w < 32; w++) begin
          logic [31:0] x;
          x = $urandom; crxq.push_back(x); exp_chain.push_back(x);
        end
      end
    end
    wait (rxq.size() == 0 && crxq.size() == 0);
    repeat (3000) @(posedge clk);
    chk(exp_ctx.size() == 0 && exp_req.size() == 0 && exp_cfg.size() == 0 && exp_beat.size() == 0,
        $sformatf("all delivered ctx=%0d req=%0d cfg=%0d beat=%0d", exp_ctx.size(), exp_req.size(),
                  exp_cfg.size(), exp_beat.size()));
    chk(exp_loc.size() == 0 && exp_chain.size() == 0 && n_tx_loc == n_rd && n_rd > 10 && n_tx_chain > 5,
        $sformatf("responses loc=%0d/%0d chain=%0d", n_tx_loc, n_rd, n_tx_chain));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
