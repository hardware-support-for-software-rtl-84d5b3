// tb_mcu: self-checking test of the memory communication unit at its
// default sizes (80 entries per mirror, 5-cycle bypass, 1 bypass per
// cycle). Directed cases, with expected values worked out by hand from
// the logical order (work thread j runs between P0's seq j-1 and seq j
// code):
//   - a P1 load gets a logically older P0 store's data exactly 5 cycles
//     after it is shown,
//   - of several matching P0 stores the youngest one older than the
//     load wins; a logically younger P0 store is ignored,
//   - two bypasses found in one cycle leave one per cycle (5 and 6),
//   - a P1 store that a younger P0 load missed raises a violation for
//     that load after a checked spawn, and none after an unchecked one,
//   - a late P0 store that an already executed P1 load missed raises a
//     violation for P1,
//   - is_oldest follows the head keys and the unjoined spawns,
//   - retirement frees entries (no more bypass) and a full mirror stalls.
module tb_mcu;
  import nxa_pkg::*;

  localparam int D = 80;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       spawn_enq, spawn_enq_checked, spawn_deq, pjn_retire;
  seq_t       seq0, seq1;
  logic [1:0] op_valid, op_ready, retire_valid, head_valid, is_oldest;
  mem_op_t    op [2];
  age_t       retire_age [2];
  mem_key_t   head_key [2];
  logic       oldest_valid;
  mem_key_t   oldest_key;
  logic [1:0] fwd_valid, viol_valid;
  age_t       fwd_age [2], viol_age [2];
  word_t      fwd_data [2];

  mcu dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int c; int cycle; age_t age; word_t data; } ev_t;
  ev_t fwds [$];
  ev_t viols [$];

  always @(negedge clk) if (rst_n)
    for (int c = 0; c < 2; c++) begin
      if (fwd_valid[c])  fwds.push_back('{c, cyc, fwd_age[c], fwd_data[c]});
      if (viol_valid[c]) viols.push_back('{c, cyc, viol_age[c], '0});
    end

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

  function automatic mem_op_t mk(logic st, int seq, logic p0, int age, longint addr, longint data);
    mem_op_t o;
    o.store = st;
    o.key   = '{seq: seq_t'(seq), p0: p0, age: age_t'(age)};
    o.addr  = addr_t'(addr);
    o.data  = word_t'(data);
    return o;
  endfunction

  // show op(s) for one cycle; returns the cycle they were shown in
  task automatic issue(input logic [1:0] v, input mem_op_t o0, input mem_op_t o1, output int at);
    op_valid = v;
    op[0] = o0;
    op[1] = o1;
    at = cyc;
    #1 check((op_ready & v) == v, "op accepted");
    @(posedge clk); #1;
    op_valid = '0;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic expect_fwd(input int c, input int cycle, input longint data, input string what);
    int k;
    k = -1;
    foreach (fwds[i]) if (fwds[i].c == c && fwds[i].cycle == cycle) k = i;
    check(k >= 0, {what, ": bypass arrives on time"});
    if (k >= 0) begin
      check(fwds[k].data == word_t'(data), {what, ": bypass data"});
      fwds.delete(k);
    end
  endtask

  task automatic pulse_spawn(input logic checked);
    spawn_enq = 1; spawn_enq_checked = checked;
    @(posedge clk); #1;
    spawn_enq = 0;
  endtask

  initial begin
    int t, t2;
    mem_op_t none;
    none = '0;
    spawn_enq = 0; spawn_enq_checked = 0; spawn_deq = 0; pjn_retire = 0;
    op_valid = '0; op = '{default: '0}; retire_valid = '0; retire_age = '{default: '0};
    head_valid = '0; head_key = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // P0 code before spawn 1 (seq 0) stores to A
    issue(2'b01, mk(1, 0, 1, 10, 'h1000, 'hAAAA), none, t);
    pulse_spawn(1'b1);                 // spawn 1, checked
    check(seq0 == 1, "core 0 spawn counter");
    spawn_deq = 1; @(posedge clk); #1; spawn_deq = 0;
    check(seq1 == 1, "core 1 spawn counter");

    // P0 code after spawn 1 (seq 1) stores A again: younger than WT1
    issue(2'b01, mk(1, 1, 1, 12, 'h1000, 'hBBBB), none, t);
    // WT1 loads A: must see the seq-0 store, 5 cycles later
    issue(2'b10, none, mk(0, 1, 0, 5, 'h1004, 0), t);
    wait_cycles(7);
    expect_fwd(1, t + 5, 'hAAAA, "older P0 store to P1 load");
    check(fwds.size() == 0, "no other bypass");

    // P0 load after spawn 1 reads B before WT1 stores B: violation (checked)
    issue(2'b01, mk(0, 1, 1, 20, 'h2000, 0), none, t);
    wait_cycles(6);
    check(fwds.size() == 0, "no bypass for B yet");
    issue(2'b10, none, mk(1, 1, 0, 6, 'h2000, 'hCCCC), t);
    wait_cycles(2);
    check(viols.size() == 1 && viols[0].c == 0 && viols[0].age == age_t'(20)
          && viols[0].cycle == t + 1, "violation for P0 load after checked spawn");
    viols.delete();

    // same pattern after an unchecked spawn: no violation
    pulse_spawn(1'b0);                 // spawn 2, unchecked
    spawn_deq = 1; @(posedge clk); #1; spawn_deq = 0;
    issue(2'b01, mk(0, 2, 1, 30, 'h3000, 0), none, t);
    issue(2'b10, none, mk(1, 2, 0, 7, 'h3000, 'hDDDD), t);
    wait_cycles(3);
    check(viols.size() == 0, "no violation after unchecked spawn");

    // WT2 loads A: both P0 stores (seq 0 and seq 1) are older; seq 1 wins.
    // In the same cycle P0 (seq 2) loads 0x2000: WT1's store is older.
    issue(2'b11, mk(0, 2, 1, 31, 'h2000, 0), mk(0, 2, 0, 8, 'h1000, 0), t);
    wait_cycles(8);
    expect_fwd(0, t + 5, 'hCCCC, "P1 store to younger P0 load");
    expect_fwd(1, t + 6, 'hBBBB, "youngest older store, second bypass one cycle later");

    // a P0 store younger than WT2 is not bypassed to WT2
    issue(2'b01, mk(1, 2, 1, 40, 'h4000, 'hEEEE), none, t);
    issue(2'b10, none, mk(0, 2, 0, 9, 'h4000, 0), t);
    wait_cycles(7);
    check(fwds.size() == 0, "younger P0 store not bypassed");

    // late P0 store (seq 1, older than WT2) after WT2 already loaded 0x5000
    issue(2'b10, none, mk(0, 2, 0, 10, 'h5000, 0), t);
    issue(2'b01, mk(1, 1, 1, 13, 'h5000, 'h5555), none, t);
    wait_cycles(2);
    check(viols.size() == 1 && viols[0].c == 1 && viols[0].age == age_t'(10),
          "violation for P1 load missing an older P0 store");
    viols.delete();

    // oldest operation
    head_valid = 2'b11;
    head_key[0] = '{seq: 2, p0: 1'b1, age: 31};
    head_key[1] = '{seq: 2, p0: 1'b0, age: 8};
    #1 check(is_oldest == 2'b10, "WT2 op older than P0 seq-2 op");
    head_key[0] = '{seq: 1, p0: 1'b1, age: 12};
    #1 check(is_oldest == 2'b01, "P0 seq-1 op older than WT2 op");
    head_valid = 2'b01;
    head_key[0] = '{seq: 2, p0: 1'b1, age: 31};
    #1 check(is_oldest == 2'b00, "P0 waits while spawns 1 and 2 are unjoined");
    pjn_retire = 1; @(posedge clk); #1;
    pjn_retire = 1; @(posedge clk); #1;
    pjn_retire = 0;
    check(is_oldest == 2'b01, "P0 oldest once spawns are joined");
    @(posedge clk); #1;
    check(oldest_valid && oldest_key == head_key[0], "oldest register");
    head_valid = '0;

    // retirement: P0 retires through age 100, so WT3 no longer sees its stores
    pulse_spawn(1'b1);
    spawn_deq = 1; @(posedge clk); #1; spawn_deq = 0;
    retire_valid = 2'b01; retire_age[0] = 100;
    @(posedge clk); #1;
    retire_valid = '0;
    issue(2'b10, none, mk(0, 3, 0, 20, 'h1000, 0), t);
    wait_cycles(7);
    check(fwds.size() == 0, "retired stores no longer bypassed");

    // fill core 0's store mirror: 80 entries then stall
    for (int i = 0; i < D; i++) issue(2'b01, mk(1, 3, 1, 200 + i, 'h8000 + 8 * i, i), none, t);
    #1 check(op_ready[0] == 1'b0, "mirror full stalls core 0");
    retire_valid = 2'b01; retire_age[0] = 200;
    @(posedge clk); #1;
    retire_valid = '0;
    check(op_ready[0] == 1'b1, "retirement frees an entry");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
