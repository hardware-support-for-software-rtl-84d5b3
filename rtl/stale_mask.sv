// stale_mask: stale register mask of one core.
//
// The mask marks architectural registers whose newest value lives in the
// other core. On P1 it is loaded from the update mask of each spawn it
// dequeues; on P0 it is loaded from the update mask of a work thread's
// endblock when that spawn was checked (pbr). Instructions then present
// their source registers in program order (at decode on P1, before
// retire on P0). A source whose bit is set must be fetched from the other
// core: its src_stale flag rises and, on P0, the instruction must replay.
//
// Loaded masks are ORed in, so a register left unread from an earlier
// spawn stays stale. A bit clears when an instruction reads it (a request
// is issued and the fetched value becomes the local copy) or when an
// instruction writes the register locally. Both clearing rules and the
// OR are this implementation's reading; the design states only the
// comparison of sources with the mask.
//
// Interface: WIDTH slots of NSRC sources and one destination each. The
// check is combinational in the cycle the slots are shown; the mask
// updates at the clock edge when advance is high. A load in the same
// cycle applies before the slots are checked.
module stale_mask
  import nxa_pkg::*;
#(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned NSRC  = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_valid,
  input  regmask_t         load_mask,
  input  logic             advance,
  input  logic [WIDTH-1:0] slot_valid,
  input  logic [NSRC-1:0]  src_valid [WIDTH],
  input  areg_t            src_reg   [WIDTH][NSRC],
  input  logic [WIDTH-1:0] slot_has_dest,
  input  areg_t            slot_dest [WIDTH],
  output logic [NSRC-1:0]  src_stale [WIDTH],
  output logic [WIDTH-1:0] slot_stale,
  output regmask_t         mask
);

  regmask_t next_mask;

  always_comb begin
    regmask_t m;
    m = mask;
    if (load_valid) m = m | load_mask;
    for (int i = 0; i < WIDTH; i++) begin
      slot_stale[i] = 1'b0;
      for (int s = 0; s < NSRC; s++) begin
        src_stale[i][s] = 1'b0;
        if (slot_valid[i] && src_valid[i][s] && int'(src_reg[i][s]) < NUM_AREGS
            && m[src_reg[i][s]]) begin
          src_stale[i][s] = 1'b1;
          slot_stale[i]   = 1'b1;
          m[src_reg[i][s]] = 1'b0;
        end
      end
      if (slot_valid[i] && slot_has_dest[i] && int'(slot_dest[i]) < NUM_AREGS)
        m[slot_dest[i]] = 1'b0;
    end
    next_mask = m;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         mask <= '0;
    else if (advance)   mask <= next_mask;
    else if (load_valid) mask <= mask | load_mask;
  end

endmodule
