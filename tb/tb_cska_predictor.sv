// tb_cska_predictor: checks the predictor of the default 32-bit hybrid adder.
// With stage sizes 2,3,4,5,8,5,3,2 the long path SLP1 (stages 2..5) covers
// bits 2..21 and SLP2 (stages 5..7) bits 14..29; the testbench writes these
// ranges out by hand and flags a path when every bit in it propagates.
// Random pairs almost never do, so most pairs are built to propagate over
// one of the ranges with a few random bits flipped.
module tb_cska_predictor;
  localparam int unsigned N = 32;
  logic [N-1:0] a, b;
  logic err, slp1, slp2;
  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, nboth = 0, nnone = 0;

  cska_predictor dut (.a(a), .b(b), .err(err), .slp1(slp1), .slp2(slp2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] p;
    bit e1, e2;
    for (int unsigned v = 0; v < 20000; v++) begin
      a = $urandom();
      case (v % 5)
        0: b = $urandom();
        1: b = ~a;
        2: b = ~a ^ (N'(1) << ($urandom() % N));
        3: b = ~a ^ ($urandom() & $urandom() & $urandom());
        default: b = ~a ^ (32'h3 << 30) ^ (N'($urandom() & 1) << ($urandom() % 14));
      endcase
      #1;
      p = a ^ b;
      e1 = 1'b1; e2 = 1'b1;
      for (int i = 2; i <= 21; i++) if (!p[i]) e1 = 1'b0;
      for (int i = 14; i <= 29; i++) if (!p[i]) e2 = 1'b0;
      if (e1 && e2) nboth++;
      else if (e1) n1++;
      else if (e2) n2++;
      else nnone++;
      checks++;
      if (slp1 !== e1 || slp2 !== e2 || err !== (e1 | e2)) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h: slp1=%b slp2=%b err=%b expected %b %b", a, b, slp1, slp2, err, e1, e2);
      end
    end
    $display("only SLP1=%0d only SLP2=%0d both=%0d none=%0d", n1, n2, nboth, nnone);
    if (n1 == 0 || n2 == 0 || nboth == 0 || nnone == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
