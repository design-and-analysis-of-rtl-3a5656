// tb_bec: checks the binary to excess-1 converter exhaustively at 4 and
// 6 bits against b + 1 modulo 2^W.
module tb_bec;
  int checks = 0, failures = 0;
  logic [3:0] b4, y4;
  logic [5:0] b6, y6;

  bec #(.W(4)) dut4 (.b(b4), .y(y4));
  bec #(.W(6)) dut6 (.b(b6), .y(y6));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      b4 = 4'(i); b6 = 6'(i);
      #1;
      checks += 2;
      if (y4 !== 4'(b4 + 4'd1)) begin failures++; $display("FAIL 4b %h -> %h", b4, y4); end
      if (y6 !== 6'(b6 + 6'd1)) begin failures++; $display("FAIL 6b %h -> %h", b6, y6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
