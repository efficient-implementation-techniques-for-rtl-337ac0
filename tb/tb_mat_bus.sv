// tb_mat_bus: self-checking testbench of the MAT bus line model.
// Random driver words, with most drivers idle (all ones): the bus must
// carry the AND of all drivers, the invalidate line the OR of all nodes'
// invalidate outputs.
//
// The wired-OR/AND bus follows the document; which polarity carries data and
// which carries invalidate is this design's own choice.
module tb_mat_bus;
  localparam int W = 32, N = 15;
  logic [W-1:0] drive [N];
  logic [N-1:0] inval;
  logic [W-1:0] bus;
  logic inval_bus;
  int checks = 0, failures = 0;

  mat_bus #(.W(W), .N(N)) dut (.*);

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic [W-1:0] e;
      e = '1;
      for (int i = 0; i < N; i++) begin
        drive[i] = ($urandom_range(4) == 0) ? $urandom : '1;
        for (int b = 0; b < W; b++) if (!drive[i][b]) e[b] = 1'b0;
      end
      inval = (n % 3 == 0) ? '0 : N'(1) << $urandom_range(N - 1);
      #1;
      checks++;
      if (bus !== e) begin failures++; $display("FAIL: bus %h expected %h", bus, e); end
      checks++;
      if (inval_bus !== (inval != 0)) begin failures++; $display("FAIL: invalidate"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
