// reg_map_silo: register map silo of one core's register communication unit.
//
// At every spawn (P0) or endblock (P1) the core's rename map, the
// architectural-to-physical register mapping at that point, is copied
// into the silo. When the other core later asks for an architectural
// register as it stood at that point, the silo gives the physical
// register to read. Entries are freed in order when the other core
// retires the matching spawn or endblock. The design names the silo and
// its use; the depth (one entry per spawn the spawn queue can hold, 256)
// and the in-order allocation are this implementation's choices.
//
// Interface: add with the full map; the entry's id is the running count
// of adds, starting at 1 so that it equals the spawn sequence number.
// add is ignored while full is high. free releases the oldest entry.
// NLOOK lookup ports read combinationally: (lk_id, lk_areg) -> lk_preg;
// lk_hit is low when lk_id is not a live entry.
module reg_map_silo
  import nxa_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned NLOOK = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             add,
  input  preg_t            add_map [NUM_AREGS],
  output seq_t             add_id,
  output logic             full,
  input  logic             free,
  input  seq_t             lk_id   [NLOOK],
  input  areg_t            lk_areg [NLOOK],
  output preg_t            lk_preg [NLOOK],
  output logic [NLOOK-1:0] lk_hit,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  preg_t silo [DEPTH][NUM_AREGS];
  seq_t  head_id;                    // id of the oldest live entry
  logic  do_add, do_free;

  assign full    = (count == DEPTH[$bits(count)-1:0]);
  assign do_add  = add && !full;
  assign do_free = free && (count != '0);
  assign add_id  = head_id + seq_t'(count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_id <= seq_t'(1);
      count   <= '0;
    end else begin
      if (do_free) head_id <= head_id + 1'b1;
      case ({do_add, do_free})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_add)
      for (int r = 0; r < NUM_AREGS; r++) silo[add_id[IW-1:0]][r] <= add_map[r];
  end

  seq_t lk_off [NLOOK];

  always_comb begin
    for (int p = 0; p < NLOOK; p++) begin
      lk_off[p]  = lk_id[p] - head_id;
      lk_hit[p]  = (32'(lk_off[p]) < 32'(count)) && (int'(lk_areg[p]) < NUM_AREGS);
      lk_preg[p] = silo[lk_id[p][IW-1:0]][(int'(lk_areg[p]) < NUM_AREGS) ? lk_areg[p] : '0];
    end
  end

endmodule
