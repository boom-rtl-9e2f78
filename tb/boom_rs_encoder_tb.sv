// boom_rs_encoder_tb: checks the RS(36,32) strip encoder.
// Random and corner data strips are encoded by the block; the check symbols must
// equal those of the reference encoder and the codeword must have zero syndromes
// at a^0..a^3 (both computed with table-based GF arithmetic in boom_tb_pkg).
module boom_rs_encoder_tb;
  import boom_ecc_pkg::*;
  import boom_tb_pkg::*;

  sym_t [RS_K-1:0]    data;
  sym_t [RS_NSYM-1:0] ecc;
  int checks = 0, failures = 0;

  boom_rs_encoder dut (.data(data), .ecc(ecc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      byte_t d [32];
      cw_a   c;
      for (int i = 0; i < 32; i++) begin
        d[i] = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : (n == 2 && i == 0) ? 8'h01 : (n == 2) ? 8'h00 : byte_t'($urandom);
        data[i] = d[i];
      end
      #1;
      c = encode(d);
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (ecc[j] !== c[j]) begin
          failures++;
          if (failures < 5) $display("strip %0d: E%0d = %h, expected %h", n, j, ecc[j], c[j]);
        end
      end
      for (int i = 0; i < 4; i++) c[i] = ecc[i];
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (syndrome(c, j) != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
