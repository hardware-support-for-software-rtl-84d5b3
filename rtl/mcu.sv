// mcu: memory communication unit shared by the two cores.
//
// The MCU mirrors each core's memory order buffer so that a load on one
// core can see a logically older store made by the other core, and so
// that a store arriving too late for a logically younger load of the
// other core is caught. It holds a store queue mirror (SQM) and a load
// queue mirror (LQM) per core, a spawn counter per core, the dependence
// checking logic (core 0 SQM against core 1 LQM, and core 1 SQM against
// core 0 LQM) and a register with the logically oldest uncommitted memory
// operation. These parts and the figures (320 entries in all, a 5-cycle
// minimum bypass latency, 1 bypass per cycle) follow the design.
//
// Logical order. Every operation carries a key {seq, p0, age}. The spawn
// counters supply seq: core 0's counter counts spawns enqueued (a P0
// operation renamed after k spawns has seq k); core 1's counter is the
// spawn it runs (a work-thread operation of spawn j has seq j, the first
// spawn being 1). P0 operations with seq k follow work thread k and
// precede work thread k+1, so keys order by seq, then work thread before
// main thread, then by each core's own program-order age. The cores tag
// operations with the counter values at rename; the key layout and the
// 16-bit wrapping counters are this implementation's choices.
//
// Operation of one cycle, per core c (o is the other core):
//   load : the youngest store in SQM[o] (or arriving from o in this same
//          cycle) to the same 8-byte word and logically older is bypassed
//          to c; the load and where it got its value are kept in LQM[c].
//   store: kept in SQM[c]; any load in LQM[o] to the same word that is
//          logically younger and took its value from something older
//          than this store has read stale data: the oldest such load is
//          reported on viol_* of core o one cycle later. Violations of
//          P0 loads are reported only for checked (pbr) spawns.
// An operation re-sent with an age already in the mirror (a replay)
// overwrites its entry. retire_age[c] frees all of core c's entries up
// to and including that age. Bypass data leaves a queue at most one per
// cycle and appears BYPASS_LAT cycles after the load was shown.
// is_oldest[c] is high when the oldest uncommitted operation of core c
// (head_key) precedes everything core o still has to commit; when P1 has
// no operation pending but spawns are not yet joined, the next spawn
// stands for it. Entries per mirror are 320/4 = 80. Word-granular
// address matching (no partial overlaps) is this implementation's choice.
module mcu
  import nxa_pkg::*;
#(
  parameter int unsigned MIRROR_DEPTH = 80,
  parameter int unsigned BYPASS_LAT   = 5,
  parameter int unsigned FWD_BUF      = 8,
  parameter int unsigned CHK_DEPTH    = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  // spawn counters
  input  logic       spawn_enq,
  input  logic       spawn_enq_checked,
  output seq_t       seq0,
  input  logic       spawn_deq,
  output seq_t       seq1,
  input  logic       pjn_retire,
  // memory operations from the cores
  input  logic [1:0] op_valid,
  input  mem_op_t    op [2],
  output logic [1:0] op_ready,
  // retirement
  input  logic [1:0] retire_valid,
  input  age_t       retire_age [2],
  input  logic [1:0] head_valid,
  input  mem_key_t   head_key [2],
  output logic [1:0] is_oldest,
  output logic       oldest_valid,
  output mem_key_t   oldest_key,
  // results
  output logic [1:0] fwd_valid,
  output age_t       fwd_age [2],
  output word_t      fwd_data [2],
  output logic [1:0] viol_valid,
  output age_t       viol_age [2]
);

  localparam int unsigned D  = MIRROR_DEPTH;
  localparam int unsigned CW = (CHK_DEPTH > 1) ? $clog2(CHK_DEPTH) : 1;
  localparam int unsigned NSTAGE = (BYPASS_LAT > 1) ? BYPASS_LAT - 1 : 1;

  typedef struct packed {
    logic  core;
    age_t  age;
    word_t data;
  } fwd_t;

  // ---------------- mirrors ----------------
  logic     sq_v   [2][D];
  mem_key_t sq_key [2][D];
  addr_t    sq_addr[2][D];
  word_t    sq_data[2][D];
  logic     lq_v   [2][D];
  mem_key_t lq_key [2][D];
  addr_t    lq_addr[2][D];
  logic     lq_src_v  [2][D];   // value came from a bypassed store
  mem_key_t lq_src_key[2][D];

  logic [CHK_DEPTH-1:0] checked_map;
  seq_t                 join_cnt;

  function automatic logic same_word(addr_t a, addr_t b);
    return a[ADDR_W-1:3] == b[ADDR_W-1:3];
  endfunction

  // ---------------- free slots ----------------
  logic [1:0] sq_free_any, lq_free_any;
  int         sq_slot [2], lq_slot [2];
  logic       fwd_room;
  logic [$clog2(FWD_BUF+1)-1:0] fwd_count;

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      sq_free_any[c] = 1'b0;
      lq_free_any[c] = 1'b0;
      sq_slot[c] = 0;
      lq_slot[c] = 0;
      for (int i = D-1; i >= 0; i--) begin
        if (!sq_v[c][i]) begin sq_free_any[c] = 1'b1; sq_slot[c] = i; end
        if (!lq_v[c][i]) begin lq_free_any[c] = 1'b1; lq_slot[c] = i; end
      end
      // a replayed operation reuses its own entry
      for (int i = 0; i < D; i++) begin
        if (op[c].store  && sq_v[c][i] && sq_key[c][i].age == op[c].key.age) sq_slot[c] = i;
        if (!op[c].store && lq_v[c][i] && lq_key[c][i].age == op[c].key.age) lq_slot[c] = i;
      end
    end
  end

  assign fwd_room = (int'(fwd_count) + 2) <= FWD_BUF;
  always_comb
    for (int c = 0; c < 2; c++)
      op_ready[c] = sq_free_any[c] && lq_free_any[c] && fwd_room;

  logic [1:0] take;
  assign take = op_valid & op_ready;

  // ---------------- dependence checking ----------------
  logic [1:0] fwd_hit;
  word_t      fwd_val [2];
  mem_key_t   fwd_src [2];
  logic [1:0] viol_hit;
  age_t       viol_hit_age [2];

  always_comb begin
    int       o;
    mem_key_t best;
    o    = 0;
    best = '0;
    for (int c = 0; c < 2; c++) begin
      o    = 1 - c;
      best = '0;
      // load on c looks for the youngest logically older store of o
      fwd_hit[c] = 1'b0;
      fwd_val[c] = '0;
      fwd_src[c] = '0;
      if (take[c] && !op[c].store) begin
        for (int i = 0; i < D; i++)
          if (sq_v[o][i] && same_word(sq_addr[o][i], op[c].addr)
              && key_before(sq_key[o][i], op[c].key)
              && (!fwd_hit[c] || key_before(fwd_src[c], sq_key[o][i]))) begin
            fwd_hit[c] = 1'b1;
            fwd_val[c] = sq_data[o][i];
            fwd_src[c] = sq_key[o][i];
          end
        if (take[o] && op[o].store && same_word(op[o].addr, op[c].addr)
            && key_before(op[o].key, op[c].key)
            && (!fwd_hit[c] || key_before(fwd_src[c], op[o].key))) begin
          fwd_hit[c] = 1'b1;
          fwd_val[c] = op[o].data;
          fwd_src[c] = op[o].key;
        end
      end
      // store on c looks for younger loads of o that missed it
      viol_hit[o]     = 1'b0;
      viol_hit_age[o] = '0;
      if (take[c] && op[c].store && (o == 1 || checked_map[op[c].key.seq[CW-1:0]])) begin
        for (int i = 0; i < D; i++)
          if (lq_v[o][i] && same_word(lq_addr[o][i], op[c].addr)
              && key_before(op[c].key, lq_key[o][i])
              && (!lq_src_v[o][i] || key_before(lq_src_key[o][i], op[c].key))
              && (!viol_hit[o] || key_before(lq_key[o][i], best))) begin
            viol_hit[o]     = 1'b1;
            viol_hit_age[o] = lq_key[o][i].age;
            best            = lq_key[o][i];
          end
      end
    end
  end

  // ---------------- mirror update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++)
        for (int i = 0; i < D; i++) begin
          sq_v[c][i]     <= 1'b0;
          lq_v[c][i]     <= 1'b0;
          lq_src_v[c][i] <= 1'b0;
        end
    end else begin
      for (int c = 0; c < 2; c++) begin
        if (retire_valid[c])
          for (int i = 0; i < D; i++) begin
            if (!age_before(retire_age[c], sq_key[c][i].age)) sq_v[c][i] <= 1'b0;
            if (!age_before(retire_age[c], lq_key[c][i].age)) lq_v[c][i] <= 1'b0;
          end
        if (take[c]) begin
          if (op[c].store) begin
            sq_v[c][sq_slot[c]] <= 1'b1;
          end else begin
            lq_v[c][lq_slot[c]]     <= 1'b1;
            lq_src_v[c][lq_slot[c]] <= fwd_hit[c];
          end
        end
      end
    end
  end

  always_ff @(posedge clk)
    for (int c = 0; c < 2; c++)
      if (take[c]) begin
        if (op[c].store) begin
          sq_key [c][sq_slot[c]] <= op[c].key;
          sq_addr[c][sq_slot[c]] <= op[c].addr;
          sq_data[c][sq_slot[c]] <= op[c].data;
        end else begin
          lq_key    [c][lq_slot[c]] <= op[c].key;
          lq_addr   [c][lq_slot[c]] <= op[c].addr;
          lq_src_key[c][lq_slot[c]] <= fwd_src[c];
        end
      end

  // ---------------- bypass path: 1 per cycle, BYPASS_LAT cycles ----------------
  logic [1:0] fq_push_valid;
  fwd_t       fq_push [2];
  logic [0:0] fq_out_valid;
  fwd_t       fq_out [1];
  logic [0:0] fq_pop;
  logic       fq_push_ready;

  always_comb
    for (int c = 0; c < 2; c++) begin
      fq_push_valid[c] = fwd_hit[c];
      fq_push[c]       = '{core: 1'(c), age: op[c].key.age, data: fwd_val[c]};
    end

  nxa_mfifo #(.T(fwd_t), .DEPTH(FWD_BUF), .NIN(2), .NOUT(1)) u_fwd_q (
    .clk, .rst_n,
    .push_valid(fq_push_valid), .push_data(fq_push), .push_ready(fq_push_ready),
    .out_valid(fq_out_valid), .out_data(fq_out), .pop_n(fq_pop), .count(fwd_count)
  );
  assign fq_pop = fq_out_valid;

  logic [NSTAGE-1:0] st_v;
  fwd_t              st [NSTAGE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_v <= '0;
    else        st_v <= {st_v[NSTAGE-2:0], fq_out_valid[0]};
  end

  always_ff @(posedge clk) begin
    st[0] <= fq_out[0];
    for (int s = 1; s < NSTAGE; s++) st[s] <= st[s-1];
  end

  always_comb
    for (int c = 0; c < 2; c++) begin
      fwd_valid[c] = st_v[NSTAGE-1] && (st[NSTAGE-1].core == 1'(c));
      fwd_age[c]   = st[NSTAGE-1].age;
      fwd_data[c]  = st[NSTAGE-1].data;
    end

  // ---------------- violations ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      viol_valid <= '0;
      viol_age   <= '{default: '0};
    end else begin
      viol_valid <= viol_hit;
      viol_age   <= viol_hit_age;
    end
  end

  // ---------------- spawn counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq0        <= '0;
      seq1        <= '0;
      join_cnt    <= '0;
      checked_map <= '0;
    end else begin
      if (spawn_enq) begin
        seq0 <= seq0 + 1'b1;
        checked_map[CW'(seq0 + 1'b1)] <= spawn_enq_checked;
      end
      if (spawn_deq)  seq1     <= seq1 + 1'b1;
      if (pjn_retire) join_cnt <= join_cnt + 1'b1;
    end
  end

  // ---------------- logically oldest operation ----------------
  mem_key_t bound0, bound1, oldest_n;
  logic     p1_idle;

  always_comb begin
    bound0  = head_valid[0] ? head_key[0] : '{seq: seq0, p0: 1'b1, age: '0};
    p1_idle = !head_valid[1] && (join_cnt == seq0);
    bound1  = head_valid[1] ? head_key[1] : '{seq: join_cnt + 1'b1, p0: 1'b0, age: '0};
    is_oldest[0] = head_valid[0] && (p1_idle || key_before(head_key[0], bound1));
    is_oldest[1] = head_valid[1] && key_before(head_key[1], bound0);
    oldest_n = (p1_idle || key_before(bound0, bound1)) ? bound0 : bound1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oldest_valid <= 1'b0;
      oldest_key   <= '0;
    end else begin
      oldest_valid <= |head_valid;
      oldest_key   <= oldest_n;
    end
  end

  a_one_bypass: assert property (@(posedge clk) disable iff (!rst_n)
    !(fq_push_valid != '0 && !fq_push_ready))
    else $error("mcu: bypass queue overflow");

endmodule
