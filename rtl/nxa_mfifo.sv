// nxa_mfifo: multi-lane FIFO used inside the communication units.
//
// Up to NIN entries enter per cycle and up to NOUT leave per cycle. The
// valid input lanes are packed in lane order, so lane 0 is older than
// lane 1 when both push. push_ready is high when NIN entries fit, and
// then every valid lane is taken. The NOUT oldest entries are shown on
// out_data with out_valid; pop_n of them (at most the number valid)
// leave at the clock edge. Entries pushed at edge t are visible from the
// cycle after t. Reset empties the FIFO.
module nxa_mfifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NIN   = 2,
  parameter int unsigned NOUT  = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NIN-1:0]             push_valid,
  input  T                           push_data [NIN],
  output logic                       push_ready,
  output logic [NOUT-1:0]            out_valid,
  output T                           out_data [NOUT],
  input  logic [$clog2(NOUT+1)-1:0]  pop_n,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  T              mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] n_push;

  function automatic logic [PW-1:0] wrap_add(logic [PW-1:0] p, int unsigned k);
    int unsigned s;
    s = int'(p) + k;
    if (s >= DEPTH) s = s - DEPTH;
    return PW'(s);
  endfunction

  assign push_ready = (int'(count) + NIN) <= DEPTH;

  always_comb begin
    n_push = '0;
    if (push_ready)
      for (int i = 0; i < NIN; i++) if (push_valid[i]) n_push = n_push + 1'b1;
  end

  always_comb begin
    for (int i = 0; i < NOUT; i++) begin
      out_valid[i] = int'(count) > i;
      out_data[i]  = mem[wrap_add(rd_ptr, i)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= wrap_add(wr_ptr, int'(n_push));
      rd_ptr <= wrap_add(rd_ptr, int'(pop_n));
      count  <= count + n_push - CW'(pop_n);
    end
  end

  always_ff @(posedge clk) begin
    int unsigned k;
    k = 0;
    if (push_ready)
      for (int i = 0; i < NIN; i++)
        if (push_valid[i]) begin
          mem[wrap_add(wr_ptr, k)] <= push_data[i];
          k = k + 1;
        end
  end

  a_pop_le_count: assert property (@(posedge clk) disable iff (!rst_n) int'(pop_n) <= int'(count))
    else $error("nxa_mfifo: pop_n exceeds occupancy");

endmodule
