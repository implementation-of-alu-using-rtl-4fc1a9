// Self-checking testbench for mbe_encoder: all eight triplets are compared
// with the MBE encoding table (neg, two, one per triplet).
module tb_mbe_encoder;
  import mbe_pkg::*;
  logic [2:0]  b;
  booth_code_t code;
  int checks = 0, failures = 0;

  // {neg, two, one} for triplets 000..111, as tabulated.
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b001, 3'b001, 3'b010,
                                       3'b110, 3'b101, 3'b101, 3'b000};

  mbe_encoder dut (.b(b), .code(code));

  initial begin
    #10000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      b = 3'(v);
      #1;
      checks++;
      if ({code.neg, code.two, code.one} != TABLE[v]) begin
        failures++;
        $display("FAIL triplet %03b -> neg=%0b two=%0b one=%0b", b, code.neg, code.two, code.one);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
