// tb_aes_key_expand: walks the key schedule of the FIPS-197 example key through ten steps and
// compares round keys 1 and 10 with the published values and every step with the reference
// model; then random keys. The round constant must follow 01 02 04 ... 1b 36.
module tb_aes_key_expand;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] kin, kout;
  logic [7:0]   rc, rcn;

  aes_key_expand dut (.key_in(kin), .rcon(rc), .key_out(kout), .rcon_next(rcn));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] rcons [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};
    logic [127:0] k0;
    for (int n = 0; n < 50; n++) begin
      k0  = (n == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      kin = k0;
      rc  = 8'h01;
      for (int r = 1; r <= 10; r++) begin
        #1;
        checks += 2;
        if (kout !== r_round_key(k0, r)) begin failures++; $display("FAIL key %0d round %0d: %h", n, r, kout); end
        if (r < 10 && rcn !== rcons[r]) begin failures++; $display("FAIL rcon after round %0d: %h", r, rcn); end
        if (n == 0 && r == 1) begin
          checks++;
          if (kout !== 128'ha0fafe1788542cb123a339392a6c7605) begin failures++; $display("FAIL FIPS round key 1"); end
        end
        if (n == 0 && r == 10) begin
          checks++;
          if (kout !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin failures++; $display("FAIL FIPS round key 10"); end
        end
        kin = kout;
        rc  = rcn;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
