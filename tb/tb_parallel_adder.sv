// tb_parallel_adder: checks the ripple carry adder against integer addition.
// An 8-bit full form (with carry out) is checked exhaustively over both
// operands and the carry input; an 11-bit modified form (no carry out) is
// checked on random operands modulo 2^11, with cout expected at 0.
module tb_parallel_adder;
  int checks = 0, failures = 0;

  logic [7:0]  x8, y8, s8;
  logic        c8, co8;
  logic [10:0] x11, y11, s11;
  logic        c11, co11;

  parallel_adder #(.W(8),  .MODIFIED(1'b0)) dut8  (.x(x8),  .y(y8),  .cin(c8),  .s(s8),  .cout(co8));
  parallel_adder #(.W(11), .MODIFIED(1'b1)) dut11 (.x(x11), .y(y11), .cin(c11), .s(s11), .cout(co11));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0]  e9;
    logic [10:0] e11;
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 256; j++) begin
        x8 = 8'(i); y8 = 8'(j); c8 = i[8];
        #1;
        e9 = 9'(x8) + 9'(y8) + 9'(c8);
        checks++;
        if ({co8, s8} !== e9) begin
          failures++;
          if (failures < 10) $display("FAIL 8b %h+%h+%b = %b%h exp %h", x8, y8, c8, co8, s8, e9);
        end
      end
    end
    for (int k = 0; k < 20000; k++) begin
      x11 = 11'($urandom); y11 = 11'($urandom); c11 = 1'($urandom);
      #1;
      e11 = x11 + y11 + 11'(c11);
      checks++;
      if (s11 !== e11 || co11 !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL 11b %h+%h+%b = %h exp %h", x11, y11, c11, s11, e11);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
