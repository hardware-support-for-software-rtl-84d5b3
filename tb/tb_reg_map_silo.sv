// tb_reg_map_silo: self-checking test of the register map silo at its
// full 256-entry depth. Random rename maps are added and freed in order;
// a model array of the maps checks every lookup, the hit flag for live
// and dead ids, the ids handed out and the full flag.
module tb_reg_map_silo;
  import nxa_pkg::*;

  localparam int DEPTH = 256, NL = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          add, full, free;
  preg_t         add_map [NUM_AREGS];
  seq_t          add_id;
  seq_t          lk_id   [NL];
  areg_t         lk_areg [NL];
  preg_t         lk_preg [NL];
  logic [NL-1:0] lk_hit;
  logic [$clog2(DEPTH+1)-1:0] count;

  reg_map_silo #(.DEPTH(DEPTH), .NLOOK(NL)) dut (.*);

  int checks = 0, failures = 0, fulls = 0;
  preg_t model [int][NUM_AREGS];
  int    head = 1, tail = 1;        // live ids are head .. tail-1

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    add = 0; free = 0;
    add_map = '{default: '0}; lk_id = '{default: '0}; lk_areg = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 4000; n++) begin
      int live;
      live = tail - head;
      // phases: mostly add (fills up), then mostly free
      add  = ((n / 700) % 2 == 0) ? ($urandom % 8 != 0) : ($urandom % 4 == 0);
      free = ((n / 700) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 8 != 0);
      for (int r = 0; r < NUM_AREGS; r++) add_map[r] = preg_t'($urandom);
      for (int p = 0; p < NL; p++) begin
        lk_id[p]   = seq_t'(head - 2 + int'($urandom % (live + 4)));
        lk_areg[p] = areg_t'($urandom % NUM_AREGS);
      end
      #1;
      check(int'(count) == live, "count");
      check(full == (live == DEPTH), "full");
      if (full) fulls++;
      check(add_id == seq_t'(tail), "add_id");
      for (int p = 0; p < NL; p++) begin
        int id;
        logic exp_hit;
        id = head + int'(seq_t'(lk_id[p] - seq_t'(head)));
        exp_hit = int'(seq_t'(lk_id[p] - seq_t'(head))) < live;
        check(lk_hit[p] == exp_hit, $sformatf("lk_hit id=%0d head=%0d live=%0d got=%0d", lk_id[p], head, live, lk_hit[p]));
        if (exp_hit) check(lk_preg[p] == model[id][lk_areg[p]], "lk_preg");
      end
      @(posedge clk); #1;
      if (add && live < DEPTH) begin
        model[tail] = add_map;
        tail++;
      end
      if (free && live > 0) begin
        model.delete(head);
        head++;
      end
    end
    check(fulls > 0, "silo reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
