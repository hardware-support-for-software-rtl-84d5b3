// nxa_top: the NXA inter-core hardware of a dual-core CMP.
//
// NXA runs one program as a main thread on core P0 and short work
// threads on core P1. P0 hands work to P1 with a spawn instruction (pbr,
// checked; pbrnc, unchecked) and P1 ends each work thread with pjn. This
// module holds everything the design adds between the two cores; the
// cores themselves, their caches and the shared L2 stay outside and meet
// it through the ports below.
//
//   spawn queue      P0 rename -> P1 fetch: target, P0's register update
//                    mask, checked flag and spawn id.
//   endblock queue   P1 rename -> P0: the work thread's update mask.
//   retire queues    spawns retired on P0 -> P1, endblocks retired on
//                    P1 -> P0 (the latter also frees P0's silo entries).
//   update masks     one per core at rename, snapshotted at pbr/pbrnc/pjn.
//   stale masks      P1: sources to fetch from P0 (loaded per spawn);
//                    P0: sources of instructions about to retire that
//                    read a register a checked work thread wrote (replay).
//   RCUs             one per core, back to back: P1's requests read P0's
//                    register file through P0's silo and vice versa.
//   MCU              cross-core store forwarding, violation detection
//                    and the logically-oldest-operation flags.
//
// Interface groups (p0_ = main core, p1_ = work core):
//   p0_rn_*  rename group of WIDTH slots; a slot with spawn set is a
//            pbr/pbrnc (at most one per group) with p0_rn_target,
//            p0_rn_checked and the rename map p0_rn_map at that point.
//            The group is taken when p0_rn_ready is high.
//   p1_sp_*  head of the spawn queue for P1 fetch; p1_sp_take pops it.
//   p1_rn_*  P1 rename group; a slot with pjn set ends the work thread.
//   p1_dc_*  P1 decode group: sources are checked against the stale mask
//            and stale ones are requested from P0 (p1_dc_src_stale);
//            p1_dc_wait marks instructions that wait for such a value.
//   p0_eb_*  head of the endblock queue for P0; p0_eb_take pops it.
//   p0_ck_*  P0 pre-retire group: p0_ck_src_stale flags sources read
//            stale after a checked spawn; p0_ck_replay marks the
//            instructions that must replay once the value arrives.
//   *_rf_*   register file ports used by the RCUs.
//   mem_*    memory operations and results of the MCU, index = core.
// Which spawn a P1 decode group belongs to (p1_dc_spawn_id), and which
// endblock a P0 check refers to (p0_ck_eb_id), come from the cores. The
// P1 stale mask takes a spawn's update mask when P1 fetch pops the spawn;
// P1's silo entries are freed by p0_eb_release, raised by P0 when it no
// longer needs a work thread's registers. These three points are this
// implementation's choices; the design leaves them open.
module nxa_top
  import nxa_pkg::*;
#(
  parameter int unsigned WIDTH        = 4,
  parameter int unsigned NSRC         = 2,
  parameter int unsigned SPAWN_DEPTH  = 256,
  parameter int unsigned SILO_DEPTH   = 256,
  parameter int unsigned READ_BUF     = 128,
  parameter int unsigned RC_BW        = 2,
  parameter int unsigned RC_LAT       = 2,
  parameter int unsigned MIRROR_DEPTH = 80,
  parameter int unsigned BYPASS_LAT   = 5,
  parameter int unsigned INFLIGHT     = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---- P0 rename ----
  input  logic [WIDTH-1:0] p0_rn_valid,
  input  logic [WIDTH-1:0] p0_rn_has_dest,
  input  areg_t            p0_rn_dest [WIDTH],
  input  logic [WIDTH-1:0] p0_rn_spawn,
  input  logic             p0_rn_checked,
  input  pc_t              p0_rn_target,
  input  preg_t            p0_rn_map [NUM_AREGS],
  output logic             p0_rn_ready,
  output seq_t             p0_seq,
  // ---- P1 fetch ----
  output logic             p1_sp_valid,
  output spawn_t           p1_sp,
  input  logic             p1_sp_take,
  output seq_t             p1_seq,
  // ---- P1 rename ----
  input  logic [WIDTH-1:0] p1_rn_valid,
  input  logic [WIDTH-1:0] p1_rn_has_dest,
  input  areg_t            p1_rn_dest [WIDTH],
  input  logic [WIDTH-1:0] p1_rn_pjn,
  input  preg_t            p1_rn_map [NUM_AREGS],
  output logic             p1_rn_ready,
  // ---- P1 decode: stale register check ----
  input  logic [WIDTH-1:0] p1_dc_valid,
  input  logic [NSRC-1:0]  p1_dc_src_valid [WIDTH],
  input  areg_t            p1_dc_src       [WIDTH][NSRC],
  input  preg_t            p1_dc_src_dst   [WIDTH][NSRC],
  input  logic [WIDTH-1:0] p1_dc_has_dest,
  input  areg_t            p1_dc_dest [WIDTH],
  input  seq_t             p1_dc_spawn_id,
  output logic             p1_dc_ready,
  output logic [NSRC-1:0]  p1_dc_src_stale [WIDTH],
  output logic [WIDTH-1:0] p1_dc_wait,
  // ---- P0: endblocks ----
  output logic             p0_eb_valid,
  output endblock_t        p0_eb,
  input  logic             p0_eb_take,
  // ---- P0 pre-retire: stale register check ----
  input  logic [WIDTH-1:0] p0_ck_valid,
  input  logic [NSRC-1:0]  p0_ck_src_valid [WIDTH],
  input  areg_t            p0_ck_src       [WIDTH][NSRC],
  input  preg_t            p0_ck_src_dst   [WIDTH][NSRC],
  input  logic [WIDTH-1:0] p0_ck_has_dest,
  input  areg_t            p0_ck_dest [WIDTH],
  input  seq_t             p0_ck_eb_id,
  output logic             p0_ck_ready,
  output logic [NSRC-1:0]  p0_ck_src_stale [WIDTH],
  output logic [WIDTH-1:0] p0_ck_replay,
  output regmask_t         p0_stale_mask,
  // ---- retire-time queues ----
  input  logic             p0_spawn_retire,
  input  seq_t             p0_spawn_retire_id,
  output logic             p0_spawn_retire_ready,
  output logic             p1_spawn_commit_valid,
  output seq_t             p1_spawn_commit_id,
  input  logic             p1_spawn_commit_take,
  input  logic             p1_pjn_retire,
  input  seq_t             p1_pjn_retire_id,
  output logic             p1_pjn_retire_ready,
  output logic             p0_eb_commit_valid,
  output seq_t             p0_eb_commit_id,
  input  logic             p0_eb_commit_take,
  input  logic             p0_eb_release,
  // ---- register files ----
  output logic [RC_BW-1:0] p0_rf_rd_en,
  output preg_t            p0_rf_rd_addr [RC_BW],
  input  word_t            p0_rf_rd_data [RC_BW],
  output logic [RC_BW-1:0] p0_rf_wr_en,
  output preg_t            p0_rf_wr_addr [RC_BW],
  output word_t            p0_rf_wr_data [RC_BW],
  input  logic             p0_rf_wr_grant,
  output logic [RC_BW-1:0] p1_rf_rd_en,
  output preg_t            p1_rf_rd_addr [RC_BW],
  input  word_t            p1_rf_rd_data [RC_BW],
  output logic [RC_BW-1:0] p1_rf_wr_en,
  output preg_t            p1_rf_wr_addr [RC_BW],
  output word_t            p1_rf_wr_data [RC_BW],
  input  logic             p1_rf_wr_grant,
  output logic [1:0]       silo_miss,
  // ---- memory communication ----
  input  logic [1:0]       mem_op_valid,
  input  mem_op_t          mem_op [2],
  output logic [1:0]       mem_op_ready,
  input  logic [1:0]       mem_retire_valid,
  input  age_t             mem_retire_age [2],
  input  logic [1:0]       mem_head_valid,
  input  mem_key_t         mem_head_key [2],
  output logic [1:0]       mem_is_oldest,
  output logic [1:0]       mem_fwd_valid,
  output age_t             mem_fwd_age [2],
  output word_t            mem_fwd_data [2],
  output logic [1:0]       mem_viol_valid,
  output age_t             mem_viol_age [2]
);

  localparam int unsigned NREQ = WIDTH * NSRC;

  // =====================================================================
  // P0 rename: update mask, spawn queue, P0 silo entry
  // =====================================================================
  logic       p0_rn_adv, sq_push_ready, silo0_full;
  logic [WIDTH-1:0] p0_snap_valid;
  regmask_t   p0_snap_mask [WIDTH];
  spawn_t     sq_push;
  logic       sq_push_valid, sq_pop_valid;
  logic       p1_take, wt_push_ready;

  assign p0_rn_ready = sq_push_ready && !silo0_full;
  assign p0_rn_adv   = p0_rn_ready && (p0_rn_valid != '0);

  reg_update_mask #(.WIDTH(WIDTH)) u_p0_mask (
    .clk, .rst_n, .advance(p0_rn_adv),
    .slot_valid(p0_rn_valid), .slot_has_dest(p0_rn_has_dest), .slot_dest(p0_rn_dest),
    .slot_boundary(p0_rn_spawn & p0_rn_valid),
    .snap_valid(p0_snap_valid), .snap_mask(p0_snap_mask), .cur_mask()
  );

  always_comb begin
    sq_push_valid = 1'b0;
    sq_push       = '0;
    sq_push.target  = p0_rn_target;
    sq_push.checked = p0_rn_checked;
    sq_push.id      = p0_seq + 1'b1;
    for (int i = 0; i < WIDTH; i++)
      if (p0_snap_valid[i]) begin
        sq_push_valid = 1'b1;
        sq_push.mask  = p0_snap_mask[i];
      end
  end

  nxa_queue #(.T(spawn_t), .DEPTH(SPAWN_DEPTH)) u_spawn_q (
    .clk, .rst_n,
    .push_valid(sq_push_valid), .push_ready(sq_push_ready), .push_data(sq_push),
    .pop_valid(sq_pop_valid), .pop_ready(p1_take), .pop_data(p1_sp), .count()
  );

  // =====================================================================
  // P1: spawns in flight between fetch and the pjn at rename
  // =====================================================================
  typedef struct packed {
    logic checked;
    seq_t id;
  } wt_t;

  logic wt_valid, p1_rn_adv, ebq_push_ready, silo1_full;
  wt_t  wt_head;
  logic p1_any_pjn;

  // P1 sees a spawn only while it can track one more work thread
  assign p1_sp_valid = sq_pop_valid && wt_push_ready;
  assign p1_take     = p1_sp_take && p1_sp_valid;
  assign p1_any_pjn = |(p1_rn_pjn & p1_rn_valid);

  nxa_queue #(.T(wt_t), .DEPTH(INFLIGHT)) u_wt_q (
    .clk, .rst_n,
    .push_valid(p1_take), .push_ready(wt_push_ready),
    .push_data('{checked: p1_sp.checked, id: p1_sp.id}),
    .pop_valid(wt_valid), .pop_ready(p1_rn_adv && p1_any_pjn), .pop_data(wt_head), .count()
  );

  assign p1_rn_ready = ebq_push_ready && !silo1_full;
  assign p1_rn_adv   = p1_rn_ready && (p1_rn_valid != '0);

  logic [WIDTH-1:0] p1_snap_valid;
  regmask_t         p1_snap_mask [WIDTH];
  endblock_t        eb_push;
  logic             eb_push_valid;

  reg_update_mask #(.WIDTH(WIDTH)) u_p1_mask (
    .clk, .rst_n, .advance(p1_rn_adv),
    .slot_valid(p1_rn_valid), .slot_has_dest(p1_rn_has_dest), .slot_dest(p1_rn_dest),
    .slot_boundary(p1_rn_pjn & p1_rn_valid),
    .snap_valid(p1_snap_valid), .snap_mask(p1_snap_mask), .cur_mask()
  );

  always_comb begin
    eb_push_valid = 1'b0;
    eb_push       = '0;
    eb_push.checked = wt_valid && wt_head.checked;
    eb_push.id      = wt_head.id;
    for (int i = 0; i < WIDTH; i++)
      if (p1_snap_valid[i]) begin
        eb_push_valid = 1'b1;
        eb_push.mask  = p1_snap_mask[i];
      end
  end

  nxa_queue #(.T(endblock_t), .DEPTH(SPAWN_DEPTH)) u_eb_q (
    .clk, .rst_n,
    .push_valid(eb_push_valid), .push_ready(ebq_push_ready), .push_data(eb_push),
    .pop_valid(p0_eb_valid), .pop_ready(p0_eb_take), .pop_data(p0_eb), .count()
  );

  // =====================================================================
  // Retire-time queues
  // =====================================================================
  logic eb_commit_pop;
  assign eb_commit_pop = p0_eb_commit_take && p0_eb_commit_valid;

  nxa_queue #(.T(seq_t), .DEPTH(SPAWN_DEPTH)) u_spawn_ret_q (
    .clk, .rst_n,
    .push_valid(p0_spawn_retire), .push_ready(p0_spawn_retire_ready), .push_data(p0_spawn_retire_id),
    .pop_valid(p1_spawn_commit_valid), .pop_ready(p1_spawn_commit_take),
    .pop_data(p1_spawn_commit_id), .count()
  );

  nxa_queue #(.T(seq_t), .DEPTH(SPAWN_DEPTH)) u_eb_ret_q (
    .clk, .rst_n,
    .push_valid(p1_pjn_retire), .push_ready(p1_pjn_retire_ready), .push_data(p1_pjn_retire_id),
    .pop_valid(p0_eb_commit_valid), .pop_ready(p0_eb_commit_take),
    .pop_data(p0_eb_commit_id), .count()
  );

  // =====================================================================
  // Stale register masks
  // =====================================================================
  logic             lreq1_ready, lreq0_ready;

  assign p1_dc_ready = lreq1_ready;
  assign p0_ck_ready = lreq0_ready;

  stale_mask #(.WIDTH(WIDTH), .NSRC(NSRC)) u_p1_stale (
    .clk, .rst_n,
    .load_valid(p1_take), .load_mask(p1_sp.mask),
    .advance(lreq1_ready && (p1_dc_valid != '0)),
    .slot_valid(p1_dc_valid), .src_valid(p1_dc_src_valid), .src_reg(p1_dc_src),
    .slot_has_dest(p1_dc_has_dest), .slot_dest(p1_dc_dest),
    .src_stale(p1_dc_src_stale), .slot_stale(p1_dc_wait), .mask()
  );

  stale_mask #(.WIDTH(WIDTH), .NSRC(NSRC)) u_p0_stale (
    .clk, .rst_n,
    .load_valid(p0_eb_take && p0_eb_valid && p0_eb.checked), .load_mask(p0_eb.mask),
    .advance(lreq0_ready && (p0_ck_valid != '0)),
    .slot_valid(p0_ck_valid), .src_valid(p0_ck_src_valid), .src_reg(p0_ck_src),
    .slot_has_dest(p0_ck_has_dest), .slot_dest(p0_ck_dest),
    .src_stale(p0_ck_src_stale), .slot_stale(p0_ck_replay), .mask(p0_stale_mask)
  );

  // requests raised by the stale checks
  logic [NREQ-1:0] lreq0_valid, lreq1_valid;
  reg_req_t        lreq0 [NREQ], lreq1 [NREQ];

  always_comb
    for (int i = 0; i < WIDTH; i++)
      for (int s = 0; s < NSRC; s++) begin
        lreq1_valid[i*NSRC+s] = p1_dc_src_stale[i][s];
        lreq1[i*NSRC+s]       = '{silo_id: p1_dc_spawn_id, areg: p1_dc_src[i][s],
                                  dst: p1_dc_src_dst[i][s]};
        lreq0_valid[i*NSRC+s] = p0_ck_src_stale[i][s];
        lreq0[i*NSRC+s]       = '{silo_id: p0_ck_eb_id, areg: p0_ck_src[i][s],
                                  dst: p0_ck_src_dst[i][s]};
      end

  // =====================================================================
  // Register communication units, wired back to back
  // =====================================================================
  logic [RC_BW-1:0] req01_valid, req10_valid, dat01_valid, dat10_valid;
  reg_req_t         req01 [RC_BW], req10 [RC_BW];
  reg_data_t        dat01 [RC_BW], dat10 [RC_BW];
  logic             rreq0_ready, rreq1_ready, din0_ready, din1_ready;
  seq_t             silo0_id, silo1_id;

  rcu #(.SILO_DEPTH(SILO_DEPTH), .READ_BUF(READ_BUF), .BW(RC_BW), .REQ_LANES(NREQ),
       .LAT(RC_LAT), .WR_BUF((RC_LAT > 4 ? RC_LAT : 4) * RC_BW * 2)) u_rcu0 (
    .clk, .rst_n,
    .silo_add(sq_push_valid && p0_rn_adv), .silo_map(p0_rn_map), .silo_add_id(silo0_id),
    .silo_full(silo0_full), .silo_free(eb_commit_pop),
    .lreq_valid(lreq0_valid & {NREQ{p0_ck_ready}}), .lreq(lreq0), .lreq_ready(lreq0_ready),
    .oreq_valid(req01_valid), .oreq(req01), .oreq_ready(rreq1_ready),
    .rreq_valid(req10_valid), .rreq(req10), .rreq_ready(rreq0_ready),
    .rf_rd_en(p0_rf_rd_en), .rf_rd_addr(p0_rf_rd_addr), .rf_rd_data(p0_rf_rd_data),
    .dout_valid(dat01_valid), .dout(dat01), .dout_ready(din1_ready),
    .din_valid(dat10_valid), .din(dat10), .din_ready(din0_ready),
    .rf_wr_en(p0_rf_wr_en), .rf_wr_addr(p0_rf_wr_addr), .rf_wr_data(p0_rf_wr_data),
    .rf_wr_grant(p0_rf_wr_grant), .silo_miss(silo_miss[0])
  );

  rcu #(.SILO_DEPTH(SILO_DEPTH), .READ_BUF(READ_BUF), .BW(RC_BW), .REQ_LANES(NREQ),
       .LAT(RC_LAT), .WR_BUF((RC_LAT > 4 ? RC_LAT : 4) * RC_BW * 2)) u_rcu1 (
    .clk, .rst_n,
    .silo_add(eb_push_valid && p1_rn_adv), .silo_map(p1_rn_map), .silo_add_id(silo1_id),
    .silo_full(silo1_full), .silo_free(p0_eb_release),
    .lreq_valid(lreq1_valid & {NREQ{p1_dc_ready}}), .lreq(lreq1), .lreq_ready(lreq1_ready),
    .oreq_valid(req10_valid), .oreq(req10), .oreq_ready(rreq0_ready),
    .rreq_valid(req01_valid), .rreq(req01), .rreq_ready(rreq1_ready),
    .rf_rd_en(p1_rf_rd_en), .rf_rd_addr(p1_rf_rd_addr), .rf_rd_data(p1_rf_rd_data),
    .dout_valid(dat10_valid), .dout(dat10), .dout_ready(din0_ready),
    .din_valid(dat01_valid), .din(dat01), .din_ready(din1_ready),
    .rf_wr_en(p1_rf_wr_en), .rf_wr_addr(p1_rf_wr_addr), .rf_wr_data(p1_rf_wr_data),
    .rf_wr_grant(p1_rf_wr_grant), .silo_miss(silo_miss[1])
  );

  // =====================================================================
  // Memory communication unit
  // =====================================================================
  mcu #(.MIRROR_DEPTH(MIRROR_DEPTH), .BYPASS_LAT(BYPASS_LAT), .CHK_DEPTH(SPAWN_DEPTH)) u_mcu (
    .clk, .rst_n,
    .spawn_enq(sq_push_valid && p0_rn_adv), .spawn_enq_checked(p0_rn_checked), .seq0(p0_seq),
    .spawn_deq(p1_take), .seq1(p1_seq), .pjn_retire(p1_pjn_retire && p1_pjn_retire_ready),
    .op_valid(mem_op_valid), .op(mem_op), .op_ready(mem_op_ready),
    .retire_valid(mem_retire_valid), .retire_age(mem_retire_age),
    .head_valid(mem_head_valid), .head_key(mem_head_key), .is_oldest(mem_is_oldest),
    .oldest_valid(), .oldest_key(),
    .fwd_valid(mem_fwd_valid), .fwd_age(mem_fwd_age), .fwd_data(mem_fwd_data),
    .viol_valid(mem_viol_valid), .viol_age(mem_viol_age)
  );

  // P0's silo entry ids run in step with spawn ids; P1's with endblocks.
  a_spawn_ids: assert property (@(posedge clk) disable iff (!rst_n)
    (sq_push_valid && p0_rn_adv) |-> (silo0_id == sq_push.id))
    else $error("nxa_top: silo entry and spawn id out of step");

  a_eb_ids: assert property (@(posedge clk) disable iff (!rst_n)
    (eb_push_valid && p1_rn_adv) |-> (wt_valid && silo1_id == eb_push.id))
    else $error("nxa_top: pjn renamed with no spawn in flight on P1");

endmodule
