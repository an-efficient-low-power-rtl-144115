// Testbench of the one-hot bit multiplexer: for every select position of a
// 32-bit bus and many random data words, y must equal data[position]; an
// all-zero select must give 0.
module tb_onehot_mux;

  localparam int unsigned N = 32;

  logic [N-1:0] data, sel;
  logic         y;
  int checks = 0, failures = 0;

  onehot_mux #(.N(N)) dut (.data(data), .sel(sel), .y(y));

  initial begin : watchdog
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      data = (r == 0) ? '0 : (r == 1) ? '1 : $urandom();
      for (int i = 0; i < int'(N); i++) begin
        sel = N'(1) << i;
        #1;
        checks++;
        if (y !== data[i]) begin
          failures++;
          $display("FAIL: data %h sel bit %0d gave %b", data, i, y);
        end
      end
      sel = '0;
      #1;
      checks++;
      if (y !== 1'b0) begin
        failures++;
        $display("FAIL: empty select gave 1");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
