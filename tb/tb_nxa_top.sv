// tb_nxa_top: end-to-end test of the NXA inter-core hardware with every
// parameter at its default. The testbench stands in for the two cores:
// it drives rename, fetch, decode, pre-retire and retire events, holds
// both register files (the value of physical register p on core c is a
// fixed function of c and p) and issues memory operations tagged with
// the spawn counters. It walks through:
//   1. a checked spawn (pbr) on P0 carrying its register update mask,
//   2. P1 reading a register P0 wrote: stale hit, request through both
//      RCUs, P0's silo mapping, value written into P1's register file,
//   3. the work thread's pjn and its endblock back to P0, a P0 read of a
//      register the work thread wrote: replay and value fetched from P1,
//   4. an unchecked spawn (pbrnc), whose endblock sets no stale bits,
//   5. cross-core store bypass and a memory dependence violation,
//   6. P0 held from being oldest until the work threads join, and the
//      retire-time queues in both directions freeing silo entries,
//   7. 256 spawns filling the spawn queue, P0 rename stalling, then P1
//      draining them in order.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_nxa_top;
  import nxa_pkg::*;

  localparam int W = 4, S = 2, BW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] p0_rn_valid, p0_rn_has_dest, p0_rn_spawn;
  areg_t        p0_rn_dest [W];
  logic         p0_rn_checked, p0_rn_ready;
  pc_t          p0_rn_target;
  preg_t        p0_rn_map [NUM_AREGS];
  seq_t         p0_seq, p1_seq;
  logic         p1_sp_valid, p1_sp_take;
  spawn_t       p1_sp;
  logic [W-1:0] p1_rn_valid, p1_rn_has_dest, p1_rn_pjn;
  areg_t        p1_rn_dest [W];
  preg_t        p1_rn_map [NUM_AREGS];
  logic         p1_rn_ready;
  logic [W-1:0] p1_dc_valid, p1_dc_has_dest, p1_dc_wait;
  logic [S-1:0] p1_dc_src_valid [W], p1_dc_src_stale [W];
  areg_t        p1_dc_src [W][S];
  preg_t        p1_dc_src_dst [W][S];
  areg_t        p1_dc_dest [W];
  seq_t         p1_dc_spawn_id;
  logic         p1_dc_ready;
  logic         p0_eb_valid, p0_eb_take;
  endblock_t    p0_eb;
  logic [W-1:0] p0_ck_valid, p0_ck_has_dest, p0_ck_replay;
  logic [S-1:0] p0_ck_src_valid [W], p0_ck_src_stale [W];
  areg_t        p0_ck_src [W][S];
  preg_t        p0_ck_src_dst [W][S];
  areg_t        p0_ck_dest [W];
  seq_t         p0_ck_eb_id;
  logic         p0_ck_ready;
  regmask_t     p0_stale_mask;
  logic         p0_spawn_retire, p0_spawn_retire_ready, p1_spawn_commit_valid, p1_spawn_commit_take;
  seq_t         p0_spawn_retire_id, p1_spawn_commit_id;
  logic         p1_pjn_retire, p1_pjn_retire_ready, p0_eb_commit_valid, p0_eb_commit_take, p0_eb_release;
  seq_t         p1_pjn_retire_id, p0_eb_commit_id;
  logic [BW-1:0] p0_rf_rd_en, p0_rf_wr_en, p1_rf_rd_en, p1_rf_wr_en;
  preg_t        p0_rf_rd_addr [BW], p0_rf_wr_addr [BW], p1_rf_rd_addr [BW], p1_rf_wr_addr [BW];
  word_t        p0_rf_rd_data [BW], p0_rf_wr_data [BW], p1_rf_rd_data [BW], p1_rf_wr_data [BW];
  logic         p0_rf_wr_grant, p1_rf_wr_grant;
  logic [1:0]   silo_miss;
  logic [1:0]   mem_op_valid, mem_op_ready, mem_retire_valid, mem_head_valid, mem_is_oldest;
  mem_op_t      mem_op [2];
  age_t         mem_retire_age [2];
  mem_key_t     mem_head_key [2];
  logic [1:0]   mem_fwd_valid, mem_viol_valid;
  age_t         mem_fwd_age [2], mem_viol_age [2];
  word_t        mem_fwd_data [2];

  nxa_top dut (.*);

  // register files of the two cores
  function automatic word_t rf_val(int core, preg_t p);
    return {8'hF0 + 8'(core), 23'b0, p, 15'b0, p} ^ (core == 0 ? 64'h1111 : 64'h2222);
  endfunction
  always_comb
    for (int i = 0; i < BW; i++) begin
      p0_rf_rd_data[i] = rf_val(0, p0_rf_rd_addr[i]);
      p1_rf_rd_data[i] = rf_val(1, p1_rf_rd_addr[i]);
    end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_spawn_checked = 0, n_spawn_unchecked = 0, n_endblock = 0;
  int n_p1_remote = 0, n_p0_replay = 0, n_bypass = 0, n_violation = 0;
  int n_oldest_wait = 0, n_spawn_q_full = 0, n_silo_free = 0, n_spawn_commit = 0;

  typedef struct { int cycle; preg_t dst; word_t data; } wr_t;
  wr_t p0_wr [$], p1_wr [$];
  typedef struct { int c; int cycle; age_t age; word_t data; } mev_t;
  mev_t fwds [$], viols [$];

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < BW; i++) begin
      if (p0_rf_wr_en[i]) p0_wr.push_back('{cyc, p0_rf_wr_addr[i], p0_rf_wr_data[i]});
      if (p1_rf_wr_en[i]) p1_wr.push_back('{cyc, p1_rf_wr_addr[i], p1_rf_wr_data[i]});
    end
    for (int c = 0; c < 2; c++) begin
      if (mem_fwd_valid[c])  fwds.push_back('{c, cyc, mem_fwd_age[c], mem_fwd_data[c]});
      if (mem_viol_valid[c]) viols.push_back('{c, cyc, mem_viol_age[c], '0});
    end
    check(silo_miss == '0, "no request for a dead silo entry");
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic idle_inputs();
    p0_rn_valid = '0; p0_rn_has_dest = '0; p0_rn_spawn = '0; p0_rn_checked = 0;
    p1_sp_take = 0;
    p1_rn_valid = '0; p1_rn_has_dest = '0; p1_rn_pjn = '0;
    p1_dc_valid = '0; p1_dc_has_dest = '0; p1_dc_src_valid = '{default: '0};
    p0_eb_take = 0;
    p0_ck_valid = '0; p0_ck_has_dest = '0; p0_ck_src_valid = '{default: '0};
    p0_spawn_retire = 0; p1_spawn_commit_take = 0;
    p1_pjn_retire = 0; p0_eb_commit_take = 0; p0_eb_release = 0;
    mem_op_valid = '0; mem_retire_valid = '0;
  endtask

  // P0 renames: dests before the spawn slot, the spawn, dests after it
  task automatic p0_group(input int d0, input int d1, input logic chk, input int d_after,
                          input pc_t target);
    p0_rn_valid = 4'b1111;
    p0_rn_has_dest = 4'b1011;
    p0_rn_spawn = 4'b0100;
    p0_rn_dest[0] = areg_t'(d0); p0_rn_dest[1] = areg_t'(d1);
    p0_rn_dest[2] = '0;          p0_rn_dest[3] = areg_t'(d_after);
    p0_rn_checked = chk;
    p0_rn_target = target;
    #1 check(p0_rn_ready, "P0 rename accepted");
    if (chk) n_spawn_checked++; else n_spawn_unchecked++;
    tick();
    p0_rn_valid = '0; p0_rn_spawn = '0; p0_rn_has_dest = '0;
  endtask

  task automatic p1_take_spawn(input int id, input regmask_t mask, input logic chk, input pc_t target);
    #1 check(p1_sp_valid, "spawn waiting for P1");
    check(p1_sp.id == seq_t'(id) && p1_sp.mask == mask && p1_sp.checked == chk
          && p1_sp.target == target, $sformatf("spawn %0d contents", id));
    p1_sp_take = 1;
    tick();
    p1_sp_take = 0;
  endtask

  // P1 renames one write then the pjn
  task automatic p1_pjn_group(input int d);
    p1_rn_valid = 4'b0011;
    p1_rn_has_dest = 4'b0001;
    p1_rn_pjn = 4'b0010;
    p1_rn_dest[0] = areg_t'(d);
    #1 check(p1_rn_ready, "P1 rename accepted");
    tick();
    p1_rn_valid = '0; p1_rn_pjn = '0; p1_rn_has_dest = '0;
  endtask

  function automatic regmask_t bits2(int a, int b);
    regmask_t m;
    m = '0;
    m[a] = 1'b1;
    m[b] = 1'b1;
    return m;
  endfunction

  task automatic mem_issue(input int c, input logic st, input mem_key_t k, input longint addr,
                           input longint data, output int at);
    mem_op_valid = '0;
    mem_op_valid[c] = 1'b1;
    mem_op[c] = '{store: st, key: k, addr: addr_t'(addr), data: word_t'(data)};
    at = cyc;
    #1 check(mem_op_ready[c], "memory op accepted");
    tick();
    mem_op_valid = '0;
  endtask

  preg_t map0 [NUM_AREGS], map1 [NUM_AREGS];

  initial begin
    int t, k;
    regmask_t mexp;
    idle_inputs();
    p0_rn_dest = '{default: '0}; p1_rn_dest = '{default: '0};
    p1_dc_src = '{default: '{default: '0}}; p1_dc_src_dst = '{default: '{default: '0}};
    p1_dc_dest = '{default: '0}; p0_ck_src = '{default: '{default: '0}};
    p0_ck_src_dst = '{default: '{default: '0}}; p0_ck_dest = '{default: '0};
    p0_rn_target = '0; p1_dc_spawn_id = '0; p0_ck_eb_id = '0;
    p0_spawn_retire_id = '0; p1_pjn_retire_id = '0;
    p0_rf_wr_grant = 1; p1_rf_wr_grant = 1;
    mem_op = '{default: '0}; mem_retire_age = '{default: '0};
    mem_head_valid = '0; mem_head_key = '{default: '0};
    for (int r = 0; r < NUM_AREGS; r++) begin
      map0[r] = preg_t'(r + 100);
      map1[r] = preg_t'(400 - r);
    end
    p0_rn_map = map0;
    p1_rn_map = map1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    tick();
    check(!p1_sp_valid && !p0_eb_valid, "queues empty after reset");

    // ---- 1. checked spawn 1: P0 wrote r3, r5 before it, r7 after ----
    p0_group(3, 5, 1'b1, 7, 64'h4000);
    check(p0_seq == 1, "P0 spawn counter");
    p1_take_spawn(1, bits2(3, 5), 1'b1, 64'h4000);
    check(p1_seq == 1, "P1 spawn counter");

    // ---- 2. P1 decode reads r3 (stale) and r9 (local) ----
    p1_dc_valid = 4'b0001;
    p1_dc_src_valid[0] = 2'b11;
    p1_dc_src[0][0] = 3; p1_dc_src[0][1] = 9;
    p1_dc_src_dst[0][0] = 9'd77;
    p1_dc_spawn_id = 1;
    #1 check(p1_dc_ready && p1_dc_src_stale[0] == 2'b01 && p1_dc_wait[0], "P1 stale source flagged");
    t = cyc;
    tick();
    p1_dc_valid = '0;
    // the same register again: no second request
    p1_dc_valid = 4'b0001;
    #1 check(p1_dc_src_stale[0] == 2'b00, "stale bit cleared after the request");
    tick();
    p1_dc_valid = '0;
    repeat (8) tick();
    check(p1_wr.size() == 1, "one value written into P1");
    if (p1_wr.size() == 1) begin
      check(p1_wr[0].dst == 9'd77 && p1_wr[0].data == rf_val(0, map0[3]),
            "P1 received P0's r3 through P0's silo mapping");
      check(p1_wr[0].cycle - t == 4, $sformatf("decode to P1 write: %0d cycles, expected 4",
                                               p1_wr[0].cycle - t));
      n_p1_remote++;
    end
    p1_wr.delete();

    // ---- 3. P1 writes r11 then pjn; P0 takes the endblock and checks ----
    p1_pjn_group(11);
    n_endblock++;
    #1 check(p0_eb_valid && p0_eb.id == 1 && p0_eb.checked && p0_eb.mask == bits2(11, 11),
             "endblock 1 contents");
    p0_eb_take = 1;
    tick();
    p0_eb_take = 0;
    check(p0_stale_mask == bits2(11, 11), "P0 stale mask loaded from checked endblock");
    p0_ck_valid = 4'b0011;
    p0_ck_src_valid[0] = 2'b01; p0_ck_src[0][0] = 11; p0_ck_src_dst[0][0] = 9'd300;
    p0_ck_src_valid[1] = 2'b01; p0_ck_src[1][0] = 4;
    p0_ck_eb_id = 1;
    #1 check(p0_ck_replay == 4'b0001, "P0 replays the reader of r11 only");
    tick();
    p0_ck_valid = '0;
    repeat (8) tick();
    check(p0_wr.size() == 1, "one value written into P0");
    if (p0_wr.size() == 1) begin
      check(p0_wr[0].dst == 9'd300 && p0_wr[0].data == rf_val(1, map1[11]),
            "P0 received P1's r11 through P1's silo mapping");
      n_p0_replay++;
    end
    p0_wr.delete();
    p0_eb_release = 1;                // P0 is done with work thread 1
    tick();
    p0_eb_release = 0;

    // ---- 4. unchecked spawn 2: its endblock leaves no stale bits ----
    p0_group(12, 12, 1'b0, 13, 64'h5000);
    p1_take_spawn(2, bits2(12, 7), 1'b0, 64'h5000);   // r7 was written after spawn 1
    p1_pjn_group(14);
    n_endblock++;
    #1 check(p0_eb_valid && !p0_eb.checked, "endblock 2 unchecked");
    p0_eb_take = 1;
    tick();
    p0_eb_take = 0;
    check(p0_stale_mask == '0, "unchecked endblock sets no stale bits");
    p0_ck_valid = 4'b0001;
    p0_ck_src_valid[0] = 2'b01; p0_ck_src[0][0] = 14; p0_ck_eb_id = 2;
    #1 check(p0_ck_replay == '0, "no replay after pbrnc");
    tick();
    p0_ck_valid = '0;
    p0_eb_release = 1;
    tick();
    p0_eb_release = 0;

    // ---- 5. memory: bypass P0 -> P1 and a violation P1 -> P0 ----
    mem_issue(0, 1'b1, '{seq: p0_seq, p0: 1'b1, age: 50}, 'h9000, 'h1234, t);  // seq 2
    p0_group(20, 21, 1'b1, 22, 64'h6000);                                     // spawn 3
    p1_take_spawn(3, bits2(20, 21) | bits2(13, 13), 1'b1, 64'h6000);
    mem_issue(1, 1'b0, '{seq: p1_seq, p0: 1'b0, age: 1}, 'h9000, 0, t);       // WT3 load
    repeat (6) tick();
    k = -1;
    foreach (fwds[i]) if (fwds[i].c == 1 && fwds[i].cycle == t + 5 && fwds[i].data == 'h1234) k = i;
    check(k >= 0, "store bypassed to P1 after 5 cycles");
    if (k >= 0) n_bypass++;
    fwds.delete();
    mem_issue(0, 1'b0, '{seq: p0_seq, p0: 1'b1, age: 51}, 'hA000, 0, t);      // P0 seq 3 load
    mem_issue(1, 1'b1, '{seq: p1_seq, p0: 1'b0, age: 2}, 'hA000, 'h77, t);    // WT3 store
    repeat (2) tick();
    check(viols.size() == 1 && viols[0].c == 0 && viols[0].age == 51, "P0 load violation");
    if (viols.size() == 1) n_violation++;
    viols.delete();

    // ---- 6. oldest operation and retire-time queues ----
    mem_head_valid = 2'b01;
    mem_head_key[0] = '{seq: 3, p0: 1'b1, age: 51};
    #1 check(!mem_is_oldest[0], "P0 not oldest while work threads are unjoined");
    if (!mem_is_oldest[0]) n_oldest_wait++;
    p1_pjn_group(23);                 // WT3 ends
    n_endblock++;
    for (int id = 1; id <= 3; id++) begin
      p0_spawn_retire = 1; p0_spawn_retire_id = seq_t'(id);
      p1_pjn_retire = 1;   p1_pjn_retire_id = seq_t'(id);
      #1 check(p0_spawn_retire_ready && p1_pjn_retire_ready, "retire queues accept");
      tick();
    end
    p0_spawn_retire = 0; p1_pjn_retire = 0;
    #1 check(mem_is_oldest[0], "P0 oldest once all work threads joined");
    mem_head_valid = '0;
    for (int id = 1; id <= 3; id++) begin
      #1 check(p1_spawn_commit_valid && p1_spawn_commit_id == seq_t'(id), "spawn commit order");
      check(p0_eb_commit_valid && p0_eb_commit_id == seq_t'(id), "endblock commit order");
      if (p1_spawn_commit_valid) n_spawn_commit++;
      if (p0_eb_commit_valid) n_silo_free++;
      p1_spawn_commit_take = 1; p0_eb_commit_take = 1;
      tick();
    end
    p1_spawn_commit_take = 0; p0_eb_commit_take = 0;
    p0_eb_take = 1; tick(); p0_eb_take = 0;                // endblock 3
    p0_eb_release = 1; tick(); p0_eb_release = 0;
    check(!p0_eb_valid && !p1_sp_valid, "all queues drained");

    // ---- 7. 256 spawns fill the spawn queue ----
    k = 0;
    p0_rn_valid = 4'b0001; p0_rn_spawn = 4'b0001; p0_rn_has_dest = '0; p0_rn_checked = 1'b0;
    for (int n = 0; n < 300; n++) begin
      p0_rn_target = pc_t'(n);
      #1;
      if (p0_rn_ready) k++;
      else n_spawn_q_full++;
      tick();
    end
    p0_rn_valid = '0; p0_rn_spawn = '0;
    check(k == 256, $sformatf("spawn queue took %0d spawns, expected 256", k));
    for (int n = 0; n < 256; n++) begin
      #1 check(p1_sp_valid && p1_sp.id == seq_t'(4 + n) && p1_sp.target == pc_t'(n),
               "spawns leave in order");
      p1_sp_take = 1;
      tick();
      p1_sp_take = 0;
      p1_pjn_group(0);
      p0_eb_take = 1; p0_eb_release = 1;
      p0_eb_commit_take = 0;
      p1_pjn_retire = 1; p1_pjn_retire_id = seq_t'(4 + n);
      tick();
      p0_eb_take = 0; p0_eb_release = 0; p1_pjn_retire = 0;
      p0_eb_commit_take = 1;
      tick();
      p0_eb_commit_take = 0;
    end
    #1 check(!p1_sp_valid, "spawn queue empty again");

    $display("mechanisms: checked_spawn=%0d unchecked_spawn=%0d endblock=%0d p1_remote_read=%0d",
             n_spawn_checked, n_spawn_unchecked, n_endblock, n_p1_remote);
    $display("mechanisms: p0_replay=%0d mem_bypass=%0d mem_violation=%0d oldest_wait=%0d",
             n_p0_replay, n_bypass, n_violation, n_oldest_wait);
    $display("mechanisms: spawn_queue_full=%0d silo_free=%0d spawn_commit=%0d",
             n_spawn_q_full, n_silo_free, n_spawn_commit);
    check(n_spawn_checked > 0, "mechanism: checked spawn");
    check(n_spawn_unchecked > 0, "mechanism: unchecked spawn");
    check(n_endblock > 0, "mechanism: endblock");
    check(n_p1_remote > 0, "mechanism: P1 remote register read");
    check(n_p0_replay > 0, "mechanism: P0 replay and register fetch");
    check(n_bypass > 0, "mechanism: memory bypass");
    check(n_violation > 0, "mechanism: memory violation");
    check(n_oldest_wait > 0, "mechanism: oldest-operation wait");
    check(n_spawn_q_full > 0, "mechanism: spawn queue full stall");
    check(n_silo_free > 0, "mechanism: silo free on endblock retire");
    check(n_spawn_commit > 0, "mechanism: spawn commit to P1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
