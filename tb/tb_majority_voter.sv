// tb_majority_voter: self-checking testbench of the bit-wise TMR voter.
// Random words, with zero, one or two channels corrupted in random bits;
// the expected majority is counted bit by bit, and the disagreement flags
// are compared with a word-level comparison against that majority.
//
// Bit-wise two-out-of-three voting follows the document; the disagreement
// flags are this design's own addition.
module tb_majority_voter;
  localparam int W = 32;
  logic [W-1:0] a, b, c, maj;
  logic [2:0] disagree;
  logic mismatch;
  int checks = 0, failures = 0;

  majority_voter #(.W(W)) dut (.*);

  function automatic logic [W-1:0] ref_maj(input logic [W-1:0] x, y, z);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = (int'(x[i]) + int'(y[i]) + int'(z[i])) >= 2;
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] good, m;
      good = $urandom;
      a = good; b = good; c = good;
      case (n % 4)
        1: a = good ^ $urandom;
        2: b = good ^ (32'h1 << $urandom_range(31));
        3: begin c = good ^ $urandom; b = $urandom; end
        default: ;
      endcase
      #1;
      m = ref_maj(a, b, c);
      checks++;
      if (maj !== m) begin failures++; $display("FAIL: maj %h expected %h", maj, m); end
      checks++;
      if (disagree !== {c != m, b != m, a != m} || mismatch !== (a != m || b != m || c != m)) begin
        failures++; $display("FAIL: flags %b", disagree);
      end
      if (n % 4 == 1 || n % 4 == 2) begin
        checks++;
        if (maj !== good) begin failures++; $display("FAIL: single fault not masked"); end
      end
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
