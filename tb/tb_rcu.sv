// tb_rcu: self-checking test of one register communication unit at its
// default sizes (256-entry silo, 128-entry read buffer, 2 transfers per
// cycle, 8 request lanes). The testbench plays the core's register file
// (value of physical register p is a fixed function of p), the other
// core's RCU on the request and data links, and checks:
//   - a request on an idle unit returns data exactly 2 cycles later,
//   - back-to-back request pairs sustain 2 values per cycle,
//   - every value equals the register file entry the silo maps to,
//   - the read buffer holds 128 requests while the data link is blocked,
//   - requests for a freed silo entry are dropped and flagged,
//   - local requests leave 2 per cycle in order, obeying oreq_ready,
//   - incoming values are written in order only while rf_wr_grant is high.
module tb_rcu;
  import nxa_pkg::*;

  localparam int BW = 2, LANES = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             silo_add, silo_full, silo_free;
  preg_t            silo_map [NUM_AREGS];
  seq_t             silo_add_id;
  logic [LANES-1:0] lreq_valid;
  reg_req_t         lreq [LANES];
  logic             lreq_ready;
  logic [BW-1:0]    oreq_valid;
  reg_req_t         oreq [BW];
  logic             oreq_ready;
  logic [BW-1:0]    rreq_valid;
  reg_req_t         rreq [BW];
  logic             rreq_ready;
  logic [BW-1:0]    rf_rd_en;
  preg_t            rf_rd_addr [BW];
  word_t            rf_rd_data [BW];
  logic [BW-1:0]    dout_valid;
  reg_data_t        dout [BW];
  logic             dout_ready;
  logic [BW-1:0]    din_valid;
  reg_data_t        din [BW];
  logic             din_ready;
  logic [BW-1:0]    rf_wr_en;
  preg_t            rf_wr_addr [BW];
  word_t            rf_wr_data [BW];
  logic             rf_wr_grant;
  logic             silo_miss;

  rcu dut (.*);

  function automatic word_t rf_val(preg_t p);
    return {16'hC0DE, 7'b0, p, 23'b0, p} ^ 64'h0123_4567_89AB_CDEF;
  endfunction

  always_comb
    for (int i = 0; i < BW; i++) rf_rd_data[i] = rf_val(rf_rd_addr[i]);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  preg_t maps [int][NUM_AREGS];
  reg_data_t exp_dout [$];
  reg_req_t  exp_oreq [$];
  reg_data_t exp_wr [$];
  int        dout_seen = 0, dout_cycles = 0, first_dout_cycle = -1;

  // scoreboard for the outputs, sampled just before each edge
  always @(negedge clk) if (rst_n) begin
    int n;
    n = 0;
    for (int i = 0; i < BW; i++)
      if (dout_valid[i]) begin
        n++;
        if (exp_dout.size() == 0) check(1'b0, "unexpected dout");
        else begin
          reg_data_t e;
          e = exp_dout.pop_front();
          check(dout[i] == e, $sformatf("dout lane %0d dst %0d data %h exp %0d %h",
                                       i, dout[i].dst, dout[i].data, e.dst, e.data));
        end
      end
    if (n > 0) begin
      dout_seen += n;
      dout_cycles++;
      if (first_dout_cycle < 0) first_dout_cycle = cyc;
    end
    for (int i = 0; i < BW; i++)
      if (oreq_valid[i]) begin
        check(oreq_ready, "oreq_valid while not ready");
        if (exp_oreq.size() == 0) check(1'b0, "unexpected oreq");
        else check(oreq[i] == exp_oreq.pop_front(), "oreq order/content");
      end
    for (int i = 0; i < BW; i++)
      if (rf_wr_en[i]) begin
        check(rf_wr_grant, "write without grant");
        if (exp_wr.size() == 0) check(1'b0, "unexpected rf write");
        else begin
          reg_data_t e;
          e = exp_wr.pop_front();
          check(rf_wr_addr[i] == e.dst && rf_wr_data[i] == e.data, "rf write content");
        end
      end
  end

  function automatic reg_req_t rnd_req(int id);
    reg_req_t r;
    r.silo_id = seq_t'(id);
    r.areg    = areg_t'($urandom % NUM_AREGS);
    r.dst     = preg_t'($urandom);
    return r;
  endfunction

  task automatic send_rreq(input logic [BW-1:0] v, input int id0, input int id1, input logic expect_hit);
    reg_req_t r [BW];
    r[0] = rnd_req(id0);
    r[1] = rnd_req(id1);
    rreq_valid = v;
    rreq = r;
    #1;
    if (rreq_ready)
      for (int i = 0; i < BW; i++)
        if (v[i] && expect_hit)
          exp_dout.push_back('{dst: r[i].dst, data: rf_val(maps[int'(r[i].silo_id)][r[i].areg])});
    @(posedge clk); #1;
    rreq_valid = '0;
  endtask

  initial begin
    int t0;
    silo_add = 0; silo_free = 0; silo_map = '{default: '0};
    lreq_valid = '0; lreq = '{default: '0}; oreq_ready = 1;
    rreq_valid = '0; rreq = '{default: '0}; dout_ready = 1;
    din_valid = '0; din = '{default: '0}; rf_wr_grant = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // four silo entries, ids 1..4
    for (int k = 1; k <= 4; k++) begin
      for (int r = 0; r < NUM_AREGS; r++) silo_map[r] = preg_t'($urandom);
      silo_add = 1;
      #1 check(silo_add_id == seq_t'(k), "silo id");
      maps[k] = silo_map;
      @(posedge clk); #1;
    end
    silo_add = 0;

    // latency: one request on an idle unit
    t0 = cyc;
    send_rreq(2'b01, 2, 2, 1'b1);
    repeat (4) @(posedge clk);
    #1;
    check(first_dout_cycle - t0 == 2, $sformatf("latency %0d, expected 2", first_dout_cycle - t0));
    check(exp_dout.size() == 0, "latency request answered");

    // bandwidth: 40 back-to-back pairs take 40 cycles of output
    dout_seen = 0; dout_cycles = 0;
    for (int n = 0; n < 40; n++) send_rreq(2'b11, 1 + $urandom % 4, 1 + $urandom % 4, 1'b1);
    repeat (6) @(posedge clk);
    #1;
    check(dout_seen == 80 && dout_cycles == 40,
          $sformatf("bandwidth: %0d values in %0d cycles", dout_seen, dout_cycles));

    // read buffer capacity: block the data link, fill to 128
    dout_ready = 0;
    for (int n = 0; n < 64; n++) begin
      check(rreq_ready, "read buffer accepts up to 128");
      send_rreq(2'b11, 3, 4, 1'b1);
    end
    #1 check(!rreq_ready, "read buffer full at 128");
    dout_ready = 1;
    repeat (70) @(posedge clk);
    #1 check(exp_dout.size() == 0, "read buffer drained");

    // freed entry: id 1 is released, a request for it is dropped
    silo_free = 1;
    @(posedge clk); #1;
    silo_free = 0;
    rreq_valid = 2'b01;
    rreq[0] = rnd_req(1);
    #1 check(silo_miss, "silo_miss for a freed entry");
    @(posedge clk); #1;
    rreq_valid = '0;
    send_rreq(2'b01, 4, 4, 1'b1);
    repeat (4) @(posedge clk);
    #1 check(exp_dout.size() == 0, "live entry still answered");

    // local requests: 8 lanes in, 2 per cycle out, with back-pressure
    for (int n = 0; n < 30; n++) begin
      for (int i = 0; i < LANES; i++) begin
        lreq_valid[i] = 1'($urandom);
        lreq[i]       = rnd_req($urandom % 8);
      end
      oreq_ready = ($urandom % 3) != 0;
      #1;
      if (lreq_ready)
        for (int i = 0; i < LANES; i++) if (lreq_valid[i]) exp_oreq.push_back(lreq[i]);
      @(posedge clk); #1;
    end
    lreq_valid = '0;
    oreq_ready = 1;
    repeat (150) @(posedge clk);
    #1 check(exp_oreq.size() == 0, "all local requests sent");

    // incoming values, written only under grant
    for (int n = 0; n < 60; n++) begin
      rf_wr_grant = ($urandom % 2) != 0;
      if (din_ready && ($urandom % 2) != 0) begin
        for (int i = 0; i < BW; i++) begin
          din_valid[i] = 1'($urandom);
          din[i]       = '{dst: preg_t'($urandom), data: {$urandom, $urandom}};
          if (din_valid[i]) exp_wr.push_back(din[i]);
        end
      end else din_valid = '0;
      @(posedge clk); #1;
    end
    din_valid = '0;
    rf_wr_grant = 1;
    repeat (20) @(posedge clk);
    #1 check(exp_wr.size() == 0, "all incoming values written");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
