// tb_dft_xor_tree: checks the observation XOR tree for N = 8 (the adder's
// size), 6 and 5: the output is the parity of the inputs, and flipping any
// single observation point flips the output.
module tb_dft_xor_tree;

  int checks = 0, failures = 0;
  logic [7:0] d8;
  logic [5:0] d6;
  logic [4:0] d5;
  logic       y8, y6, y5;

  dft_xor_tree #(.N(8)) u8 (.d(d8), .y(y8));
  dft_xor_tree #(.N(6)) u6 (.d(d6), .y(y6));
  dft_xor_tree #(.N(5)) u5 (.d(d5), .y(y5));

  function automatic logic parity(input logic [7:0] v);
    logic p = 1'b0;
    for (int i = 0; i < 8; i++) if (v[i]) p = !p;
    return p;
  endfunction

  task automatic check(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", name, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic base;
      d8 = 8'(v); d6 = 6'(v); d5 = 5'(v);
      #1;
      check("n8", y8, parity(d8));
      check("n6", y6, parity({2'b0, d6}));
      check("n5", y5, parity({3'b0, d5}));
      base = y8;
      for (int i = 0; i < 8; i++) begin
        d8[i] = !d8[i];
        #1 check("n8 single flip", y8, !base);
        d8[i] = !d8[i];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
