// tb_reg_update_mask: self-checking test of the rename-stage update mask.
// Random 4-slot rename groups with destination writes and occasional
// boundary instructions (spawn/pjn) are applied; a model ORs in each
// destination and, at each boundary, compares the snapshot with the
// registers written since the previous boundary, then clears.
module tb_reg_update_mask;
  import nxa_pkg::*;

  localparam int W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         advance;
  logic [W-1:0] slot_valid, slot_has_dest, slot_boundary, snap_valid;
  areg_t        slot_dest [W];
  regmask_t     snap_mask [W];
  regmask_t     cur_mask;

  reg_update_mask #(.WIDTH(W)) dut (.*);

  int checks = 0, failures = 0, boundaries = 0;
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
    advance = 0; slot_valid = '0; slot_has_dest = '0; slot_boundary = '0;
    slot_dest = '{default: '0};
    model = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(cur_mask == '0, "reset clears mask");
    for (int n = 0; n < 3000; n++) begin
      advance = ($urandom % 8) != 0;
      for (int i = 0; i < W; i++) begin
        slot_valid[i]    = 1'($urandom);
        slot_boundary[i] = ($urandom % 10) == 0;
        slot_has_dest[i] = !slot_boundary[i] && 1'($urandom);
        slot_dest[i]     = areg_t'($urandom % NUM_AREGS);
      end
      #1;
      check(cur_mask == model, "cur_mask");
      for (int i = 0; i < W; i++) begin
        logic exp_v;
        exp_v = advance && slot_valid[i] && slot_boundary[i];
        check(snap_valid[i] == exp_v, "snap_valid");
        if (exp_v) begin
          check(snap_mask[i] == model, $sformatf("snapshot slot %0d", i));
          boundaries++;
          model = '0;
        end else if (advance && slot_valid[i] && slot_has_dest[i]) begin
          model[slot_dest[i]] = 1'b1;
        end
      end
      @(posedge clk); #1;
    end
    check(boundaries > 100, "enough boundaries seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
