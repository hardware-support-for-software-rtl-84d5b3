// reg_update_mask: register update bitmask kept at a core's rename stage.
//
// Each renamed instruction that writes an architectural register sets
// that register's bit. A boundary instruction (pbr or pbrnc on P0, pjn on
// P1) takes a snapshot of the mask, which travels with the spawn or
// endblock to the other core, and clears the mask so it records the next
// group of instructions. This follows the design's description; handling
// a rename group of WIDTH slots in program order is this implementation's
// choice, with WIDTH defaulting to the 4-wide issue of the core.
//
// Interface: per slot, valid, has_dest, dest and boundary. A boundary
// slot's snapshot covers the older slots of the same group and all groups
// since the previous boundary; it is shown in the same cycle on
// snap_valid/snap_mask. cur_mask is the registered mask between groups.
// Slots are taken only while advance is high.
module reg_update_mask
  import nxa_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             advance,
  input  logic [WIDTH-1:0] slot_valid,
  input  logic [WIDTH-1:0] slot_has_dest,
  input  areg_t            slot_dest [WIDTH],
  input  logic [WIDTH-1:0] slot_boundary,
  output logic [WIDTH-1:0] snap_valid,
  output regmask_t         snap_mask [WIDTH],
  output regmask_t         cur_mask
);

  regmask_t next_mask;

  always_comb begin
    regmask_t m;
    m = cur_mask;
    for (int i = 0; i < WIDTH; i++) begin
      snap_valid[i] = 1'b0;
      snap_mask[i]  = m;
      if (advance && slot_valid[i]) begin
        if (slot_boundary[i]) begin
          snap_valid[i] = 1'b1;
          m = '0;
        end else if (slot_has_dest[i] && int'(slot_dest[i]) < NUM_AREGS) begin
          m[slot_dest[i]] = 1'b1;
        end
      end
    end
    next_mask = m;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cur_mask <= '0;
    else        cur_mask <= next_mask;
  end

endmodule
