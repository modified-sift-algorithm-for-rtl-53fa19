// tb_array_mult: checks the array multiplier against the * operator on
// corner values and random operands, at the column-filter (9 x 11) and
// row-filter (19 x 11) widths.
module tb_array_mult;
  int checks = 0, failures = 0;

  logic [8:0]  a1; logic [10:0] b1; logic [19:0] p1;
  logic [18:0] a2; logic [10:0] b2; logic [29:0] p2;

  array_mult #(.A_W(9),  .B_W(11)) dut1 (.a(a1), .b(b1), .p(p1));
  array_mult #(.A_W(19), .B_W(11)) dut2 (.a(a2), .b(b2), .p(p2));

  task automatic check(input logic [8:0] x1, input logic [10:0] y1,
                       input logic [18:0] x2, input logic [10:0] y2);
    a1 = x1; b1 = y1; a2 = x2; b2 = y2;
    #1;
    checks += 2;
    if (p1 !== 20'(x1) * 20'(y1)) begin
      failures++; $display("FAIL 9x11 %0d*%0d = %0d", x1, y1, p1);
    end
    if (p2 !== 30'(x2) * 30'(y2)) begin
      failures++; $display("FAIL 19x11 %0d*%0d = %0d", x2, y2, p2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, '1, '1, '1);
    check('0, '1, '0, '1);
    check(9'd510, 11'd1024, 19'd262143, 11'd1024);
    check(9'd1, 11'd1, 19'd1, 11'd1);
    for (int i = 0; i < 2000; i++)
      check(9'($urandom), 11'($urandom), 19'($urandom), 11'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
