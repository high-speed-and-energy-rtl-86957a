// tb_ci_cska: checks the 32-bit CI-CSKA in three configurations against
// 33-bit integer addition:
//   u_vss : default variable stage sizes, no nucleus (plain CI-CSKA)
//   u_fss : fixed stage sizes, eight 4-bit stages
//   u_hyb : variable stage sizes with stage 5 replaced by the Brent-Kung adder
// Operands are a mix of uniform random pairs and pairs that propagate on
// almost every bit (b close to ~a), which drive the carry through long runs
// of skip gates. Counts additions whose carry crossed at least four stage
// boundaries by skipping and fails if there were none.
module tb_ci_cska;
  import cska_pkg::*;
  localparam int unsigned N = 32;
  localparam int unsigned NVEC = 20000;
  logic [N-1:0] a, b, s_vss, s_fss, s_hyb;
  logic cin, c_vss, c_fss, c_hyb;
  int checks = 0, failures = 0;
  int n_long = 0, n_cout = 0;

  ci_cska u_vss (.a(a), .b(b), .cin(cin), .s(s_vss), .cout(c_vss));
  ci_cska #(.SIZES(FSS_SIZES)) u_fss (.a(a), .b(b), .cin(cin), .s(s_fss), .cout(c_fss));
  ci_cska #(.NUCLEUS(5)) u_hyb (.a(a), .b(b), .cin(cin), .s(s_hyb), .cout(c_hyb));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, logic [N-1:0] s, logic c, logic [N:0] ref_sum);
    checks++;
    if ({c, s} !== ref_sum) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h cin=%b: got %b_%h expected %h", tag, a, b, cin, c, s, ref_sum);
    end
  endtask

  initial begin
    logic [N:0] ref_sum;
    int run, best;
    for (int unsigned v = 0; v < NVEC; v++) begin
      a = $urandom();
      case (v % 4)
        0, 1: b = $urandom();
        2:    b = ~a ^ (N'(1) << ($urandom() % N));                 // one generate/kill bit
        default: b = ~a ^ ($urandom() & $urandom() & $urandom() & $urandom());
      endcase
      cin = $urandom();
      #1;
      ref_sum = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};
      check("VSS", s_vss, c_vss, ref_sum);
      check("FSS", s_fss, c_fss, ref_sum);
      check("HYB", s_hyb, c_hyb, ref_sum);
      if (ref_sum[N]) n_cout++;
      // Longest run of propagating bits: a carry crossing it skips stages.
      run = 0; best = 0;
      for (int i = 0; i < N; i++) begin
        run  = (a[i] ^ b[i]) ? run + 1 : 0;
        best = (run > best) ? run : best;
      end
      if (best >= 20) n_long++;
    end
    $display("long propagate runs=%0d carry outs=%0d", n_long, n_cout);
    if (n_long == 0 || n_cout == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
