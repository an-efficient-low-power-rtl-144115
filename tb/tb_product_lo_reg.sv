// Testbench of the lower product half: a one-hot select walks across the
// register as in a multiplication, with the enable sometimes low, and random
// data. A reference copy is updated the same way; every bit not selected must
// keep its value. Also checks the asynchronous reset.
module tb_product_lo_reg;

  localparam int unsigned N = 32;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic en, d;
  logic [N-1:0] sel, q, ref_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  product_lo_reg #(.N(N)) dut (.clk(clk), .rst(rst), .en(en), .sel(sel), .d(d), .q(q));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    en = 1'b0; d = 1'b0; sel = N'(1);
    #1 rst = 1'b1;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL: reset"); end
    ref_q = '0;
    @(negedge clk) rst = 1'b0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      en = ($urandom_range(0, 7) != 0);
      d  = 1'($urandom());
      @(posedge clk);
      if (en) ref_q = (ref_q & ~sel) | (d ? sel : '0);
      @(negedge clk);
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL: q %h expected %h", q, ref_q);
      end
      if (en) sel = {sel[N-2:0], sel[N-1]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
