// tb_csa_adder: checks the carry select adder against integer addition
// modulo 2^W: the 8-bit converter form and the 8-bit dual ripple form
// exhaustively (both operands, both carry inputs), the 11-bit converter
// form on random operands.
module tb_csa_adder;
  int checks = 0, failures = 0;
  logic [7:0]  x8, y8, s8b, s8d;
  logic        c8;
  logic [10:0] x11, y11, s11;
  logic        c11;

  csa_adder #(.W(8),  .USE_BEC(1'b1)) dut_bec  (.x(x8),  .y(y8),  .cin(c8),  .s(s8b));
  csa_adder #(.W(8),  .USE_BEC(1'b0)) dut_dual (.x(x8),  .y(y8),  .cin(c8),  .s(s8d));
  csa_adder #(.W(11), .USE_BEC(1'b1)) dut11    (.x(x11), .y(y11), .cin(c11), .s(s11));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  e8;
    logic [10:0] e11;
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 256; j++) begin
        x8 = 8'(i); y8 = 8'(j); c8 = i[8];
        #1;
        e8 = x8 + y8 + 8'(c8);
        checks += 2;
        if (s8b !== e8) begin
          failures++;
          if (failures < 10) $display("FAIL bec %h+%h+%b = %h exp %h", x8, y8, c8, s8b, e8);
        end
        if (s8d !== e8) begin
          failures++;
          if (failures < 10) $display("FAIL dual %h+%h+%b = %h exp %h", x8, y8, c8, s8d, e8);
        end
      end
    end
    for (int k = 0; k < 20000; k++) begin
      x11 = 11'($urandom); y11 = 11'($urandom); c11 = 1'($urandom);
      #1;
      e11 = x11 + y11 + 11'(c11);
      checks++;
      if (s11 !== e11) begin
        failures++;
        if (failures < 10) $display("FAIL 11b %h+%h+%b = %h exp %h", x11, y11, c11, s11, e11);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
