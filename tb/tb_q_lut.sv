// tb_q_lut: self-checking test of the quantisation step table.
//
// The table gives q = (2Es/N0 + 3 sqrt(2Es/N0)) / NormMax as an unsigned
// 3.5 fixed-point code (q_code / 32, rounded, limited to 1..255) for the SNR
// grid Es/N0 = -10 dB + 0.25 dB * snr_idx. Every one of the 32 x 64 entries is
// compared with a real-valued model computed here; besides, q must not fall
// when the SNR rises and must not rise when NormMax rises (checked on the
// unsaturated part). The table is combinational; sampled 1 ns after the
// inputs change.
module tb_q_lut;
  int checks = 0, failures = 0;
  logic [4:0] norm_max;
  logic [5:0] snr_idx;
  logic [7:0] q_code;
  int prev;
  int tab [32][64];

  q_lut dut (.*);

  function automatic int model(int nm, int si);
    real g, q;
    int c;
    if (nm == 0) nm = 1;
    g = 2.0 * (10.0 ** ((-10.0 + 0.25 * real'(si)) / 10.0));
    q = (g + 3.0 * $sqrt(g)) / real'(nm);
    c = int'($floor(q * 32.0 + 0.5));
    return (c < 1) ? 1 : (c > 255) ? 255 : c;
  endfunction

  initial begin
    for (int nm = 0; nm < 32; nm++)
      for (int si = 0; si < 64; si++) begin
        norm_max = 5'(nm); snr_idx = 6'(si);
        #1;
        tab[nm][si] = int'(q_code);
        checks++;
        if (int'(q_code) != model(nm, si)) begin
          failures++;
          if (failures < 10) $display("q(%0d,%0d) = %0d, expected %0d", nm, si, q_code, model(nm, si));
        end
      end
    for (int nm = 1; nm < 32; nm++)
      for (int si = 1; si < 64; si++) begin
        checks += 2;
        if (tab[nm][si] < tab[nm][si-1]) begin failures++; $display("q falls with SNR at %0d,%0d", nm, si); end
        if (nm > 1 && tab[nm][si] > tab[nm-1][si]) begin failures++; $display("q rises with NormMax at %0d,%0d", nm, si); end
      end
    // a known point: Es/N0 = 0 dB (idx 40), NormMax 10: (2 + 3*1.414)/10 = 0.624 -> 20
    checks++;
    if (tab[10][40] != 20) begin failures++; $display("q(10, 0 dB) = %0d", tab[10][40]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
