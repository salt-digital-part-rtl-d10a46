// tb_tmr_reg: loads values into a tmr_reg, then corrupts one copy at a time and checks that
// the output never changes, that mismatch flags the upset and that the copy is repaired on
// the next clock edge.
module tb_tmr_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, mm;
  logic [7:0] d = 0, q;
  always #5 clk = ~clk;

  tmr_reg #(.W(8), .RESET_VAL(8'h5A)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q), .mismatch(mm));

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #5000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 check(q == 8'h5A, "reset value");
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      logic [7:0] v, flip;
      int c;
      v = 8'($urandom);
      @(negedge clk); load = 1; d = v;
      @(negedge clk); load = 0; d = ~v;
      check(q == v, "loaded value");
      check(!mm, "no mismatch after load");
      c = t % 3;
      flip = 8'($urandom) | 8'h01;
      case (c)
        0: begin force dut.copy0 = v ^ flip; #1 release dut.copy0; end
        1: begin force dut.copy1 = v ^ flip; #1 release dut.copy1; end
        default: begin force dut.copy2 = v ^ flip; #1 release dut.copy2; end
      endcase
      #1 check(q == v, "vote hides the upset");
      check(mm, "mismatch flags the upset");
      @(negedge clk);
      check(q == v && !mm, "copy repaired after one edge");
      check(dut.copy0 == v && dut.copy1 == v && dut.copy2 == v, "corrupted copy reloaded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
