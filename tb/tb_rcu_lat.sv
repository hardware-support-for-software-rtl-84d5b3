// tb_rcu_lat: the register communication unit with its link stretched to
// 8 cycles, the longest register latency of the sensitivity study. A
// single request on an idle unit must return exactly 8 cycles later, a
// stream of request pairs must still deliver 2 values per cycle, and
// every value must match the register file entry the silo maps to.
module tb_rcu_lat;
  import nxa_pkg::*;

  localparam int BW = 2, LANES = 8, LAT = 8;

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

  rcu #(.LAT(LAT), .WR_BUF(32)) dut (.*);

  function automatic word_t rf_val(preg_t p);
    return {32'h5A5A_0000, 7'b0, p, 7'b0, p} ^ 64'hFEDC_BA98_7654_3210;
  endfunction

  always_comb
    for (int i = 0; i < BW; i++) rf_rd_data[i] = rf_val(rf_rd_addr[i]);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  preg_t     map [NUM_AREGS];
  reg_data_t exp_dout [$];
  int        seen = 0, busy = 0, first = -1;

  always @(negedge clk) if (rst_n) begin
    int n;
    n = 0;
    for (int i = 0; i < BW; i++)
      if (dout_valid[i]) begin
        n++;
        if (exp_dout.size() == 0) check(1'b0, "unexpected dout");
        else check(dout[i] == exp_dout.pop_front(), "dout content and order");
      end
    if (n > 0) begin
      seen += n;
      busy++;
      if (first < 0) first = cyc;
    end
  end

  task automatic send(input logic [BW-1:0] v);
    for (int i = 0; i < BW; i++) begin
      rreq[i].silo_id = 1;
      rreq[i].areg    = areg_t'($urandom % NUM_AREGS);
      rreq[i].dst     = preg_t'($urandom);
    end
    rreq_valid = v;
    #1 check(rreq_ready, "request accepted");
    for (int i = 0; i < BW; i++)
      if (v[i]) exp_dout.push_back('{dst: rreq[i].dst, data: rf_val(map[rreq[i].areg])});
    @(posedge clk); #1;
    rreq_valid = '0;
  endtask

  initial begin
    int t0;
    silo_add = 0; silo_free = 0; lreq_valid = '0; lreq = '{default: '0}; oreq_ready = 1;
    rreq_valid = '0; rreq = '{default: '0}; dout_ready = 1;
    din_valid = '0; din = '{default: '0}; rf_wr_grant = 1;
    for (int r = 0; r < NUM_AREGS; r++) map[r] = preg_t'($urandom);
    silo_map = map;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    silo_add = 1;
    @(posedge clk); #1;
    silo_add = 0;

    t0 = cyc;
    send(2'b01);
    repeat (LAT + 2) @(posedge clk);
    #1 check(first - t0 == LAT, $sformatf("latency %0d, expected %0d", first - t0, LAT));

    seen = 0; busy = 0;
    for (int n = 0; n < 50; n++) send(2'b11);
    repeat (LAT + 4) @(posedge clk);
    #1 check(seen == 100 && busy == 50, $sformatf("%0d values in %0d cycles", seen, busy));
    check(exp_dout.size() == 0, "all answered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
