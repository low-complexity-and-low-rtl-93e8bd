// tb_llr_mux: checks the LLR multiplexer: with only the SD path valid the SD
// LLRs and tag pass; with only the SM path valid the 19-bit SM LLRs are
// sign-extended to 24 bits and the SM flag is set; with neither, out_valid is
// low. (Both paths valid in one clock is excluded by the design and flagged by
// an assertion, so it is not driven here.)
module tb_llr_mux;
  import mimo_pkg::*;
  logic sd_valid, sm_valid, out_valid, out_is_sm;
  logic signed [L1W-1:0] sd_llr [NLLR];
  logic signed [L2W-1:0] sm_llr [NLLR];
  logic signed [L1W-1:0] out_llr [NLLR];
  tag_t sd_tag, sm_tag, out_tag;

  llr_mux dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++; $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sel;
    for (int i = 0; i < 3000; i++) begin
      sel = $urandom_range(0, 2);
      sd_valid = (sel == 1); sm_valid = (sel == 2);
      sd_tag = tag_t'($urandom); sm_tag = tag_t'($urandom);
      for (int k = 0; k < NLLR; k++) begin
        sd_llr[k] = L1W'($urandom);
        sm_llr[k] = L2W'($urandom);
      end
      #1;
      checks++;
      if (out_valid != (sel != 0)) begin failures++; $display("ERROR: valid"); end
      if (sel == 1) begin
        checks++;
        if (out_is_sm || out_tag != sd_tag) begin failures++; $display("ERROR: SD select"); end
        for (int k = 0; k < NLLR; k++) begin
          checks++;
          if (out_llr[k] != sd_llr[k]) begin failures++; $display("ERROR: SD llr %0d", k); end
        end
      end
      if (sel == 2) begin
        checks++;
        if (!out_is_sm || out_tag != sm_tag) begin failures++; $display("ERROR: SM select"); end
        for (int k = 0; k < NLLR; k++) begin
          checks++;
          if (longint'(out_llr[k]) != longint'(sm_llr[k])) begin
            failures++; $display("ERROR: SM llr %0d got %0d exp %0d", k, out_llr[k], sm_llr[k]);
          end
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
