// tb_ica_pkg: checks the shared constants and the byte popcount of ica_pkg.
// Bounds are compared with the band 16384 +- 466 and 512 +- 56 written out;
// popcount8 is compared with $countones for all 256 bytes.
module tb_ica_pkg;
  import ica_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    checks++; if (MONO_LO != 15917) failures++;
    checks++; if (MONO_HI != 16851) failures++;
    checks++; if (PAT_LO != 455) failures++;
    checks++; if (PAT_HI != 569) failures++;
    checks++; if (PC_LO != 30'(32'h4000_0000 >> 2)) failures++;
    checks++; if (PC_HI != 30'(32'h5FFF_FFFC >> 2)) failures++;
    for (int b = 0; b < 256; b++) begin
      checks++;
      if (int'(popcount8(8'(b))) != $countones(8'(b))) begin
        failures++;
        $display("popcount8(%0d) = %0d", b, popcount8(8'(b)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
