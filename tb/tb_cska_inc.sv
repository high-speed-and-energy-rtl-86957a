// tb_cska_inc: exhaustive check of the incrementation block for W = 5:
// every partial sum x and carry in; expected s = (x + cin) mod 2^W.
module tb_cska_inc;
  localparam int unsigned W = 5;
  logic [W-1:0] x, s;
  logic cin;
  int checks = 0, failures = 0;

  cska_inc #(.W(W)) dut (.x(x), .cin(cin), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total;
    for (int unsigned xi = 0; xi < (1 << W); xi++)
      for (int unsigned ci = 0; ci < 2; ci++) begin
        x = W'(xi); cin = ci[0];
        #1;
        total = xi + ci;
        checks++;
        if (s !== W'(total)) begin
          failures++;
          $display("FAIL x=%h cin=%b: s=%h, expected %h", x, cin, s, W'(total));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
