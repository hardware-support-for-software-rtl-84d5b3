// nxa_queue: first-in first-out queue between the two cores.
//
// Four of these connect P0 and P1: spawns from P0's rename stage to P1's
// fetch stage, endblocks from P1's rename stage back to P0, and the two
// retire-time queues that tell the other core a spawn or endblock has
// committed. The design sizes the spawn queue at 256 spawns; the other
// three reuse that depth, which is this implementation's choice.
//
// Interface: valid/ready on both sides. A push is taken when push_valid
// and push_ready are high at a clock edge; the head is shown on pop_data
// while pop_valid is high and leaves on an edge with pop_ready high.
// A value pushed at edge t can be popped from the cycle after t. A push
// and a pop may happen in the same cycle, also when the queue is full
// (push_ready is then low, so no push happens). Reset empties the queue.
module nxa_queue #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 256
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push_valid,
  output logic push_ready,
  input  T     push_data,
  output logic pop_valid,
  input  logic pop_ready,
  output T     pop_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                 mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic             do_push, do_pop;

  assign push_ready = (count != DEPTH[$bits(count)-1:0]);
  assign pop_valid  = (count != '0);
  assign pop_data   = mem[rd_ptr];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

endmodule
