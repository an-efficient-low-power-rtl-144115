// Testbench of the BZ-FAD multiplier configured as a 16 x 16-bit radix-2
// multiplier with 4-bit ring-counter blocks (four blocks), the size of the
// published multiplier power comparison. Runs all multiplier bit patterns of
// a sliding 16-bit window plus random operand pairs and checks every product
// against a reference, and that each multiplication takes 16 cycles.
module tb_bzfad_multiplier_16;

  localparam int unsigned N = 16;

  logic           clk = 1'b0;
  logic           rst = 1'b0;
  logic           start = 1'b0;
  logic [N-1:0]   a = '0, b = '0;
  logic           busy, done;
  logic [2*N-1:0] product;
  logic [N/4-1:0] hot_blocks;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bzfad_multiplier #(.N(N), .BLOCK(4)) dut (
    .clk(clk), .rst(rst), .start(start), .a(a), .b(b),
    .busy(busy), .done(done), .product(product), .hot_blocks(hot_blocks)
  );

  task automatic multiply(input logic [N-1:0] x, input logic [N-1:0] y);
    int n;
    if (!done) @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 0;
    while (!done && n < 100) begin
      @(negedge clk);
      n++;
    end
    checks += 2;
    if (n != int'(N)) begin
      failures++;
      $display("FAIL: latency %0d", n);
    end
    if (product !== 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL: %h * %h = %h", x, y, product);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    @(negedge clk);
    for (int i = 0; i < int'(N); i++) multiply(16'hFFFF, 16'(1) << i);
    multiply('1, '1);
    multiply('0, '1);
    for (int r = 0; r < 1500; r++) multiply(16'($urandom()), 16'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
