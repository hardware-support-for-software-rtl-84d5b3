// tb_stale_mask: self-checking test of the stale register mask. Masks are
// loaded at random and 4-slot groups with two sources and a destination
// each are checked. The model keeps its own stale set: a source is stale
// when its bit is set, the first stale read or any local write clears it,
// and loads OR new bits in.
module tb_stale_mask;
  import nxa_pkg::*;

  localparam int W = 4, S = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         load_valid, advance;
  regmask_t     load_mask, mask;
  logic [W-1:0] slot_valid, slot_has_dest, slot_stale;
  logic [S-1:0] src_valid [W];
  areg_t        src_reg [W][S];
  areg_t        slot_dest [W];
  logic [S-1:0] src_stale [W];

  stale_mask #(.WIDTH(W), .NSRC(S)) dut (.*);

  int checks = 0, failures = 0, hits = 0;
  regmask_t model;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_valid = 0; advance = 0; load_mask = '0; slot_valid = '0; slot_has_dest = '0;
    src_valid = '{default: '0}; src_reg = '{default: '{default: '0}}; slot_dest = '{default: '0};
    model = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 3000; n++) begin
      regmask_t m;
      load_valid = ($urandom % 6) == 0;
      load_mask  = {$urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom};
      advance    = ($urandom % 5) != 0;
      for (int i = 0; i < W; i++) begin
        slot_valid[i]    = 1'($urandom);
        slot_has_dest[i] = 1'($urandom);
        // small register range so that hits and collisions are frequent
        slot_dest[i]     = areg_t'($urandom % 12);
        for (int s = 0; s < S; s++) begin
          src_valid[i][s] = 1'($urandom);
          src_reg[i][s]   = areg_t'($urandom % 12);
        end
      end
      #1;
      check(mask == model, "mask register");
      m = model;
      if (load_valid) m |= load_mask;
      for (int i = 0; i < W; i++) begin
        logic any;
        any = 1'b0;
        for (int s = 0; s < S; s++) begin
          logic e;
          e = slot_valid[i] && src_valid[i][s] && m[src_reg[i][s]];
          check(src_stale[i][s] == e, $sformatf("src_stale[%0d][%0d]", i, s));
          if (e) begin m[src_reg[i][s]] = 1'b0; any = 1'b1; hits++; end
        end
        check(slot_stale[i] == any, "slot_stale");
        if (slot_valid[i] && slot_has_dest[i]) m[slot_dest[i]] = 1'b0;
      end
      if (advance) model = m;
      else if (load_valid) model |= load_mask;
      @(posedge clk); #1;
    end
    check(hits > 100, "enough stale hits seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
