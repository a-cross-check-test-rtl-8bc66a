// tb_sel_shift_reg: self-checking test of the cyclic select shift register.
// A reference model of the pattern is updated from the same random command
// stream and compared after every clock; directed sequences check the
// normal one-hot scan with wrap-around, the preset (all lines on) and the
// clear-then-load used by the cross-check test.
module tb_sel_shift_reg;
  import fpa_pkg::*;

  localparam int unsigned LEN = 5;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  sr_cmd_t        cmd = SR_HOLD;
  logic           din = 1'b0;
  logic [LEN-1:0] sel;
  logic [LEN-1:0] model = '0;

  int checks = 0;
  int failures = 0;

  sel_shift_reg #(.LEN(LEN)) dut (.clk(clk), .rst_n(rst_n), .cmd(cmd), .din(din), .sel(sel));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (sel !== model) begin
      failures++;
      $display("FAIL %s: sel=%b expected %b", what, sel, model);
    end
  endtask

  task automatic apply(input sr_cmd_t c, input logic d);
    cmd = c;
    din = d;
    @(posedge clk);
    unique case (c)
      SR_SHIFT:  model = {model[LEN-2:0], model[LEN-1]};
      SR_LOAD:   model = {model[LEN-2:0], d};
      SR_CLEAR:  model = '0;
      SR_PRESET: model = '1;
      default:   ;
    endcase
    #1 check(c.name());
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check("reset");
    rst_n = 1'b1;
    // Normal operation: one token stepping through every stage and wrapping.
    apply(SR_CLEAR, 1'b0);
    apply(SR_LOAD, 1'b1);
    checks++;
    if (sel != LEN'(1)) begin failures++; $display("FAIL token not at stage 0"); end
    for (int k = 1; k <= 2 * LEN; k++) begin
      apply(SR_SHIFT, 1'b0);
      checks++;
      if (sel != (LEN'(1) << (k % LEN))) begin
        failures++;
        $display("FAIL token step %0d sel=%b", k, sel);
      end
    end
    apply(SR_HOLD, 1'b1);
    // Cross-check: every line on; shifting keeps all on.
    apply(SR_PRESET, 1'b0);
    checks++;
    if (sel != '1) begin failures++; $display("FAIL preset"); end
    apply(SR_SHIFT, 1'b0);
    // Random commands against the model.
    for (int k = 0; k < 200; k++) begin
      apply(sr_cmd_t'($urandom_range(4, 0)), 1'($urandom));
    end
    // Asynchronous reset clears the pattern between clock edges.
    apply(SR_PRESET, 1'b0);
    #2 rst_n = 1'b0;
    model = '0;
    #1 check("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
