// tb_partition_multiplier: checks the partitioned multiplier against the
// plain product at the two significand widths (24 and 53 bits, four
// groups) on random and extreme operands, and an 8-bit two-group
// instance exhaustively.
module tb_partition_multiplier;
  int checks = 0, failures = 0;
  logic [23:0]  a24, b24;
  logic [47:0]  p24;
  logic [52:0]  a53, b53;
  logic [105:0] p53;
  logic [7:0]   a8, b8;
  logic [15:0]  p8;

  partition_multiplier #(.W(24), .GROUPS(4)) dut24 (.a(a24), .b(b24), .p(p24));
  partition_multiplier #(.W(53), .GROUPS(4)) dut53 (.a(a53), .b(b53), .p(p53));
  partition_multiplier #(.W(8),  .GROUPS(2)) dut8  (.a(a8),  .b(b8),  .p(p8));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check24();
    #1;
    checks++;
    if (p24 !== 48'(a24) * 48'(b24)) begin
      failures++;
      if (failures < 10) $display("FAIL 24b %h*%h = %h", a24, b24, p24);
    end
  endtask

  task automatic check53();
    #1;
    checks++;
    if (p53 !== 106'(a53) * 106'(b53)) begin
      failures++;
      if (failures < 10) $display("FAIL 53b %h*%h = %h", a53, b53, p53);
    end
  endtask

  initial begin
    a24 = '1; b24 = '1; check24();
    a24 = 24'h800000; b24 = 24'hFFFFFF; check24();
    a53 = '1; b53 = '1; check53();
    a53 = {1'b1, 52'd0}; b53 = '1; check53();
    for (int k = 0; k < 5000; k++) begin
      a24 = 24'($urandom); b24 = 24'($urandom); check24();
      a53 = {$urandom, $urandom}; b53 = {$urandom, $urandom}; check53();
    end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(a8) * 16'(b8)) begin
          failures++;
          if (failures < 10) $display("FAIL 8b %h*%h = %h", a8, b8, p8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
