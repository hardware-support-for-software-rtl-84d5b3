// tb_nxa_queue: self-checking test of the inter-core queue at its full
// 256-entry depth, carrying spawn records. A software model (a SystemVerilog
// queue) predicts every popped record, the count and the full/empty flags.
// Random push/pop traffic runs first, then the queue is filled to 256 to
// check that push_ready drops exactly there, then drained.
module tb_nxa_queue;
  import nxa_pkg::*;

  localparam int DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   push_valid, push_ready, pop_valid, pop_ready;
  spawn_t push_data, pop_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  nxa_queue #(.T(spawn_t), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  spawn_t model [$];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic spawn_t rnd_spawn();
    spawn_t s;
    s.target  = {$urandom, $urandom};
    s.mask    = {$urandom, $urandom, $urandom};
    s.checked = 1'($urandom);
    s.id      = 16'($urandom);
    return s;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cycle: drive, compare at the edge, update the model
  task automatic step(input logic pv, input logic pr);
    logic do_push, do_pop;
    push_valid = pv;
    pop_ready  = pr;
    push_data  = rnd_spawn();
    #1;
    check(int'(count) == model.size(), $sformatf("count %0d model %0d", count, model.size()));
    check(push_ready == (model.size() < DEPTH), "push_ready");
    check(pop_valid == (model.size() > 0), "pop_valid");
    if (pop_valid && model.size() > 0) check(pop_data == model[0], "pop_data order");
    do_push = pv && push_ready;
    do_pop  = pr && pop_valid;
    @(posedge clk);
    if (do_pop)  void'(model.pop_front());
    if (do_push) model.push_back(push_data);
    #1;
  endtask

  initial begin
    push_valid = 0; pop_ready = 0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 2000; i++) step(1'($urandom), 1'($urandom));
    while (model.size() < DEPTH) step(1'b1, 1'b0);
    step(1'b1, 1'b0);                        // refused while full
    check(model.size() == DEPTH, "fill to 256");
    step(1'b1, 1'b1);                        // pop only: full
    while (model.size() > 0) step(1'b0, 1'b1);
    step(1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
