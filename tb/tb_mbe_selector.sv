// Self-checking testbench for mbe_selector: for every triplet and every pair
// of multiplicand bits (a_j, a_j-1) the selected bit is compared with the
// p_j column of the MBE table: 0 for +-0, a_j for +A, ~a_j for -A, a_j-1 for
// +2A and ~a_j-1 for -2A. The Booth code is taken from the table, not from
// the encoder.
module tb_mbe_selector;
  import mbe_pkg::*;
  booth_code_t code;
  logic b_msb, a_j, a_jm1, p, exp;
  int checks = 0, failures = 0;

  mbe_selector dut (.code(code), .b_msb(b_msb), .a_j(a_j), .a_jm1(a_jm1), .p(p));

  initial begin
    #10000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++)
      for (int v = 0; v < 4; v++) begin
        {a_j, a_jm1} = 2'(v);
        b_msb = t[2];
        case (t)
          0, 7: begin code = '{neg: 1'b0, one: 1'b0, two: 1'b0}; exp = 1'b0;   end
          1, 2: begin code = '{neg: 1'b0, one: 1'b1, two: 1'b0}; exp = a_j;    end
          3:    begin code = '{neg: 1'b0, one: 1'b0, two: 1'b1}; exp = a_jm1;  end
          4:    begin code = '{neg: 1'b1, one: 1'b0, two: 1'b1}; exp = ~a_jm1; end
          default: begin code = '{neg: 1'b1, one: 1'b1, two: 1'b0}; exp = ~a_j; end
        endcase
        #1;
        checks++;
        if (p !== exp) begin
          failures++;
          $display("FAIL triplet %03b a_j=%0b a_j-1=%0b -> p=%0b exp %0b", 3'(t), a_j, a_jm1, p, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
