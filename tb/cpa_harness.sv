// cpa_harness: drives one final adder stage with two rows and checks p.
//
// Draws row0 below column 2N-1 and row1 inside the adder span LO..HI (also
// below column 2N-1, so the sum always fits the product) and checks that the
// stage returns x = row0 + row1.
// Counts how often the adder's carry reaches column HI+1 (when it exists).
module cpa_harness
  import mult_pkg::*;
#(
  parameter int          N      = 16,
  parameter int          LO     = 1,
  parameter int          HI     = 30,
  parameter adder_kind_e ADDER  = ADD_CLA,
  parameter int          TRIALS = 2000
) (
  output int checks,
  output int failures,
  output bit done
);
  logic [2*N-1:0] row0, row1, p, x, span;
  int carries;

  cpa_stage #(.N(N), .LO(LO), .HI(HI), .ADDER(ADDER)) dut (.row0(row0), .row1(row1), .p(p));

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    carries = 0;
    span = ((2*N)'(1) << (HI + 1)) - ((2*N)'(1) << LO);
    if (HI == 2 * N - 1) span = ~(((2*N)'(1) << LO) - 1);
    for (int t = 0; t < TRIALS; t++) begin
      row0 = (2*N)'({$urandom, $urandom, $urandom, $urandom}) >> 1;
      row1 = ((2*N)'({$urandom, $urandom, $urandom, $urandom}) >> 1) & span;
      if (t % 3 == 0) row1 = (span >> 1) & span;
      if (t % 5 == 0) row0 = ~row1 >> 1;
      x = row0 + row1;
      #1;
      checks++;
      if (p !== x) begin
        failures++;
        $display("FAIL N=%0d LO=%0d rows %h %h -> %h exp %h", N, LO, row0, row1, p, x);
      end
      if (HI + 1 < 2 * N && p[HI+1]) carries++;
    end
    if (HI + 1 < 2 * N) begin
      checks++;
      if (carries == 0) begin
        failures++;
        $display("FAIL N=%0d carry into column %0d never seen", N, HI + 1);
      end
    end
    done = 1'b1;
  end
endmodule
