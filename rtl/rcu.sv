// rcu: register communication unit of one core.
//
// Registers move between the cores lazily, only when an instruction
// reads one that the other core wrote. Each core has an RCU; the two are
// wired back to back. An RCU holds, as the design describes:
//   - a register map silo with the rename map at each spawn/endblock,
//   - a buffer of register requests raised by this core (req buffer),
//   - a buffer of pending reads of this core's register file (read
//     buffer, 128 entries), serving requests from the other core,
// and, at the receiving side, a buffer of values waiting to be written
// into this core's register file (write buffer).
//
// A request from the other core (silo id, architectural register,
// requester's physical register) looks up the physical register in the
// silo as it arrives and enters the read buffer. Up to BW reads of the
// register file are made per cycle and their values go out on dout one
// cycle later. So a request shown on rreq in cycle t gives data on dout
// in cycle t+LAT when nothing is queued: with the default LAT = 2 this is
// the design's 2-cycle minimum latency, at 2 transfers per cycle. LAT
// above 2 adds register stages on the link to the other core, as in the
// latency sensitivity study (up to 8 cycles). Requests naming a silo entry that is
// not live are dropped and counted on silo_miss.
//
// Interface: valid lanes with a shared ready per bundle. lreq (REQ_LANES
// lanes) is taken whole when lreq_ready is high and leaves on oreq, BW
// per cycle, when oreq_ready is high. rreq is taken whole when
// rreq_ready is high. Register file reads are combinational: rf_rd_data
// must answer rf_rd_addr in the same cycle. Reads stop while dout_ready
// is low. din values are written BW per cycle while rf_wr_grant is high;
// din_ready tells the other side there is room for all values that can
// still be on the link (LAT cycles of BW values, at least two).
// Buffer depths other than the read buffer, and the register file port
// timing, are this implementation's choices.
module rcu
  import nxa_pkg::*;
#(
  parameter int unsigned SILO_DEPTH = 256,
  parameter int unsigned READ_BUF   = 128,
  parameter int unsigned BW         = 2,
  parameter int unsigned REQ_LANES  = 8,
  parameter int unsigned REQ_BUF    = 32,
  parameter int unsigned WR_BUF     = 16,
  parameter int unsigned LAT        = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // register map silo
  input  logic                 silo_add,
  input  preg_t                silo_map [NUM_AREGS],
  output seq_t                 silo_add_id,
  output logic                 silo_full,
  input  logic                 silo_free,
  // requests raised by this core
  input  logic [REQ_LANES-1:0] lreq_valid,
  input  reg_req_t             lreq [REQ_LANES],
  output logic                 lreq_ready,
  // requests to the other core's RCU
  output logic [BW-1:0]        oreq_valid,
  output reg_req_t             oreq [BW],
  input  logic                 oreq_ready,
  // requests from the other core's RCU
  input  logic [BW-1:0]        rreq_valid,
  input  reg_req_t             rreq [BW],
  output logic                 rreq_ready,
  // this core's register file, read side
  output logic [BW-1:0]        rf_rd_en,
  output preg_t                rf_rd_addr [BW],
  input  word_t                rf_rd_data [BW],
  // values to the other core's RCU
  output logic [BW-1:0]        dout_valid,
  output reg_data_t            dout [BW],
  input  logic                 dout_ready,
  // values from the other core's RCU
  input  logic [BW-1:0]        din_valid,
  input  reg_data_t            din [BW],
  output logic                 din_ready,
  // this core's register file, write side
  output logic [BW-1:0]        rf_wr_en,
  output preg_t                rf_wr_addr [BW],
  output word_t                rf_wr_data [BW],
  input  logic                 rf_wr_grant,
  output logic                 silo_miss
);

  localparam int unsigned PN = $clog2(BW+1);

  typedef struct packed {
    preg_t src;   // this core's physical register
    preg_t dst;   // requester's physical register
  } rd_ent_t;

  // ---------------- silo ----------------
  seq_t        lk_id   [BW];
  areg_t       lk_areg [BW];
  preg_t       lk_preg [BW];
  logic [BW-1:0] lk_hit;

  always_comb
    for (int i = 0; i < BW; i++) begin
      lk_id[i]   = rreq[i].silo_id;
      lk_areg[i] = rreq[i].areg;
    end

  reg_map_silo #(.DEPTH(SILO_DEPTH), .NLOOK(BW)) u_silo (
    .clk, .rst_n,
    .add(silo_add), .add_map(silo_map), .add_id(silo_add_id), .full(silo_full),
    .free(silo_free),
    .lk_id, .lk_areg, .lk_preg, .lk_hit,
    .count()
  );

  // ---------------- outgoing request buffer ----------------
  logic [PN-1:0] req_pop;
  logic [BW-1:0] req_out_valid;

  nxa_mfifo #(.T(reg_req_t), .DEPTH(REQ_BUF), .NIN(REQ_LANES), .NOUT(BW)) u_req_buf (
    .clk, .rst_n,
    .push_valid(lreq_valid), .push_data(lreq), .push_ready(lreq_ready),
    .out_valid(req_out_valid), .out_data(oreq), .pop_n(req_pop), .count()
  );

  always_comb begin
    oreq_valid = oreq_ready ? req_out_valid : '0;
    req_pop    = '0;
    for (int i = 0; i < BW; i++) if (oreq_valid[i]) req_pop = req_pop + 1'b1;
  end

  // ---------------- read buffer ----------------
  logic [BW-1:0] rd_push_valid;
  rd_ent_t       rd_push [BW];
  logic [BW-1:0] rd_out_valid;
  rd_ent_t       rd_out [BW];
  logic [PN-1:0] rd_pop;

  always_comb begin
    silo_miss = 1'b0;
    for (int i = 0; i < BW; i++) begin
      rd_push_valid[i] = rreq_valid[i] && lk_hit[i];
      rd_push[i]       = '{src: lk_preg[i], dst: rreq[i].dst};
      if (rreq_valid[i] && rreq_ready && !lk_hit[i]) silo_miss = 1'b1;
    end
  end

  nxa_mfifo #(.T(rd_ent_t), .DEPTH(READ_BUF), .NIN(BW), .NOUT(BW)) u_read_buf (
    .clk, .rst_n,
    .push_valid(rd_push_valid), .push_data(rd_push), .push_ready(rreq_ready),
    .out_valid(rd_out_valid), .out_data(rd_out), .pop_n(rd_pop), .count()
  );

  always_comb begin
    rd_pop = '0;
    for (int i = 0; i < BW; i++) begin
      rf_rd_en[i]   = dout_ready && rd_out_valid[i];
      rf_rd_addr[i] = rd_out[i].src;
      if (rf_rd_en[i]) rd_pop = rd_pop + 1'b1;
    end
  end

  // link delay: LAT-1 register stages after the register file read
  localparam int unsigned NST = (LAT > 2) ? LAT - 1 : 1;

  logic [BW-1:0] lk_v [NST];
  reg_data_t     lk_d [NST][BW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NST; s++) lk_v[s] <= '0;
    end else begin
      lk_v[0] <= rf_rd_en;
      for (int s = 1; s < NST; s++) lk_v[s] <= lk_v[s-1];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < BW; i++) begin
      lk_d[0][i].dst  <= rd_out[i].dst;
      lk_d[0][i].data <= rf_rd_data[i];
    end
    for (int s = 1; s < NST; s++) lk_d[s] <= lk_d[s-1];
  end

  assign dout_valid = lk_v[NST-1];
  assign dout       = lk_d[NST-1];

  // ---------------- write buffer ----------------
  logic [BW-1:0] wr_out_valid;
  reg_data_t     wr_out [BW];
  logic [PN-1:0] wr_pop;
  logic [$clog2(WR_BUF+1)-1:0] wr_count;
  logic          wr_push_ready;

  // Room for every transfer that can be in flight on the link (LAT-1
  // cycles of reads already granted) plus the one being granted now.
  assign din_ready = (int'(wr_count) + ((LAT > 2) ? LAT : 2) * BW) <= WR_BUF;

  nxa_mfifo #(.T(reg_data_t), .DEPTH(WR_BUF), .NIN(BW), .NOUT(BW)) u_write_buf (
    .clk, .rst_n,
    .push_valid(din_valid), .push_data(din), .push_ready(wr_push_ready),
    .out_valid(wr_out_valid), .out_data(wr_out), .pop_n(wr_pop), .count(wr_count)
  );

  always_comb begin
    wr_pop = '0;
    for (int i = 0; i < BW; i++) begin
      rf_wr_en[i]   = rf_wr_grant && wr_out_valid[i];
      rf_wr_addr[i] = wr_out[i].dst;
      rf_wr_data[i] = wr_out[i].data;
      if (rf_wr_en[i]) wr_pop = wr_pop + 1'b1;
    end
  end

  a_din_room: assert property (@(posedge clk) disable iff (!rst_n) (din_valid != '0) |-> wr_push_ready)
    else $error("rcu: register data arrived with the write buffer full");

endmodule
