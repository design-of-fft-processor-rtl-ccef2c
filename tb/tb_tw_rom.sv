// tb_tw_rom - reads all 296 words of the ROMs of PE0..PE3 and compares them
// with exp(-j 2 pi e/1024), e taken from the twiddle map (stage 1: k(4 n1 +
// p), stage 2: 8k(4 n2 + p), stage 3: 64k (p mod 2)), to within one LSB of
// Q2.16.
module tb_tw_rom;
  logic [8:0] addr;
  logic signed [17:0] re [4], im [4];
  int checks = 0, failures = 0;
  for (genvar p = 0; p < 4; p++) begin : g
    tw_rom #(.PE_ID(p)) u (.addr(addr), .tw_re(re[p]), .tw_im(im[p]));
  end
  initial begin
    for (int a = 0; a < 296; a++) begin
      addr = 9'(a);
      #1;
      for (int p = 0; p < 4; p++) begin
        int e, k;
        real er, ei;
        k = a % 8;
        if (a < 256)      e = k * (4 * (a / 8) + p);          // stage 1, n1 = a/8
        else if (a < 288) e = 8 * k * (4 * ((a - 256) / 8) + p); // stage 2
        else              e = 64 * k * (p % 2);               // stage 3
        er = 65536.0 * $cos(2.0 * 3.14159265358979 * e / 1024.0);
        ei = -65536.0 * $sin(2.0 * 3.14159265358979 * e / 1024.0);
        checks++;
        if (re[p] - er > 1.0 || er - re[p] > 1.0 || im[p] - ei > 1.0 || ei - im[p] > 1.0) begin
          failures++; $display("FAIL: PE%0d addr %0d got %0d %0d exp %f %f", p, a, re[p], im[p], er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
