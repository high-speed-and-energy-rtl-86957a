// tb_cska_vl_top: end-to-end test of the hybrid variable latency adder at its
// default size (32 bits, stage sizes 2,3,4,5,8,5,3,2, Brent-Kung stage 5).
//
// A stream of operand pairs is offered with random gaps. Each accepted pair is
// queued with its expected sum (integer addition), the expected latency (two
// cycles when the pair propagates over all of bits 2..21 or all of bits
// 14..29, the long paths SLP1/SLP2, otherwise one) and the cycle it was
// taken. Every result is checked for value, order, out_long and latency.
// Inputs are driven and outputs sampled on the falling clock edge.
//
// Mechanisms counted, each of which must occur: one-cycle additions,
// stretched two-cycle additions through SLP1 only, SLP2 only and both,
// input stalls (in_valid while in_ready is low), back-to-back accepts, and
// carry outs.
module tb_cska_vl_top;
  localparam int unsigned N = 32;
  localparam int unsigned NOPS = 4000;

  typedef struct {
    logic [N:0] sum;
    bit         long_op;
    int         taken;
  } exp_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [N-1:0] a = '0, b = '0, sum;
  logic cin = 1'b0, out_valid, cout, out_long;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_short = 0, n_long = 0, n_slp1 = 0, n_slp2 = 0, n_both = 0;
  int n_stall = 0, n_b2b = 0, n_cout = 0;
  exp_t q[$];

  cska_vl_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .cin(cin), .out_valid(out_valid), .sum(sum), .cout(cout),
    .out_long(out_long)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (NOPS * 4 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_operands(int unsigned sel, output logic [N-1:0] x,
                                        output logic [N-1:0] y);
    x = $urandom();
    case (sel % 8)
      0, 1, 2: y = $urandom();
      3: y = ~x;                                             // both paths
      4: y = ~x ^ (N'(1) << (22 + $urandom() % 8));          // SLP1 only
      5: y = ~x ^ (N'(1) << (2 + $urandom() % 12));          // SLP2 only
      6: y = ~x ^ (N'(1) << ($urandom() % N));
      default: y = ~x ^ ($urandom() & $urandom() & $urandom());
    endcase
  endfunction

  initial begin
    int done = 0, offered = 0;
    bit last_take = 1'b0;
    logic [N-1:0] x, y;
    logic [N-1:0] p;
    bit e1, e2;
    exp_t e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (done < NOPS) begin
      @(negedge clk);
      // Result registered at the last rising edge.
      if (out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL result with no operation outstanding");
        end else begin
          e = q.pop_front();
          if ({cout, sum} !== e.sum || out_long !== e.long_op ||
              cyc - e.taken != (e.long_op ? 2 : 1)) begin
            failures++;
            if (failures < 10)
              $display("FAIL got %b_%h long=%b after %0d cycles, expected %h long=%b",
                       cout, sum, out_long, cyc - e.taken, e.sum, e.long_op);
          end
          if (out_long) n_long++; else n_short++;
        end
        done++;
      end
      // Keep offering the same pair while it is not taken.
      if (!(in_valid && !last_take)) begin
        if ($urandom() % 4 != 0 && offered < NOPS) begin
          make_operands($urandom(), x, y);
          a = x; b = y; cin = $urandom();
          in_valid = 1'b1;
        end else begin
          in_valid = 1'b0;
        end
      end
      #1;
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        p = a ^ b;
        e1 = 1'b1; e2 = 1'b1;
        for (int i = 2; i <= 21; i++) if (!p[i]) e1 = 1'b0;
        for (int i = 14; i <= 29; i++) if (!p[i]) e2 = 1'b0;
        if (e1 && e2) n_both++; else if (e1) n_slp1++; else if (e2) n_slp2++;
        e.sum = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};
        e.long_op = e1 | e2;
        e.taken = cyc + 1;
        if (e.sum[N]) n_cout++;
        q.push_back(e);
        offered++;
        if (last_take) n_b2b++;
        last_take = 1'b1;
      end else begin
        last_take = 1'b0;
      end
    end
    $display("short=%0d long=%0d (SLP1 only=%0d SLP2 only=%0d both=%0d) stalls=%0d back-to-back=%0d couts=%0d",
             n_short, n_long, n_slp1, n_slp2, n_both, n_stall, n_b2b, n_cout);
    if (n_short == 0 || n_long == 0 || n_slp1 == 0 || n_slp2 == 0 || n_both == 0 ||
        n_stall == 0 || n_b2b == 0 || n_cout == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d operations never completed", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
