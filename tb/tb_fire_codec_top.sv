// tb_fire_codec_top: end-to-end run of all five links of fire_codec_top at
// their default sizes.
//
// On each link the encoder output goes through a channel that adds an error
// pattern and straight into the decoder, symbol by symbol (the decoder takes
// a symbol in the same clock the encoder emits it). Per block the link picks
// one of: no error, a correctable burst in the information part, a burst
// anywhere (often inside the check symbols), a burst longer than the code
// corrects, scattered bit errors. It checks the transmitted block against
// long division, the decoded information and status against the reference
// decoder, that correctable bursts give back the original information, and
// the decoder timing. Mechanisms counted per link, each of which must occur:
// clean block, burst trapped and corrected (Gate 1 closed, Gate 2 open),
// uncorrectable pattern, burst confined to the check symbols; the shortened
// links (1 and 3) exercise the input pre-multiplier.
module tb_fire_codec_top;
  import fire_pkg::*;
  import fire_ref_pkg::*;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [4:0] enc_sym_en = '0, enc_info_in = '0, enc_info_req, enc_code_out, enc_code_sop, enc_code_eop;
  logic [4:0] dec_rx_valid = '0, dec_rx_bit = '0, dec_rx_ready, dec_out_valid, dec_out_bit,
              dec_out_first, dec_out_last;
  dec_status_t [4:0] dec_status;

  fire_codec_top dut (.*);

  int n_clean[5], n_corr[5], n_unc[5], n_chk[5];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  task automatic run_link(input int l, input int n, input int k, input int b,
                          input gpoly_t g, input int blocks);
    int r = n - k;
    for (int blk = 0; blk < blocks; blk++) begin
      vec_t info = '0, cw, err = '0, sent = '0, got = '0;
      ref_result_t exp;
      int kind = blk % 5;
      int len, pos;
      bit must_restore = 0;
      dec_status_t st = '0;
      for (int i = 0; i < k; i++) info[i] = 1'($urandom);
      cw = encode(info, k, g);
      case (kind)
        0: ;
        1: begin
          len = $urandom_range(1, b);
          pos = $urandom_range(r - len + 1, n - len);
          err = burst(pos, len);
          must_restore = 1;
        end
        2: begin
          len = $urandom_range(1, b);
          pos = ($urandom_range(1) == 0) ? $urandom_range(0, r - len) : $urandom_range(0, n - len);
          err = burst(pos, len);
          must_restore = (pos + len - 1 >= r);
        end
        3: begin
          len = $urandom_range(b + 1, (r < 2 * b + 1) ? r : 2 * b + 1);
          pos = $urandom_range(0, n - len);
          err = burst(pos, len);
        end
        default: begin
          int ne = $urandom_range(2, 5);
          for (int i = 0; i < ne; i++) err[$urandom_range(0, n - 1)] = 1'b1;
        end
      endcase
      exp = ref_decode(cw ^ err, n, k, b, g);

      for (int t = 0; t < n; t++) begin
        while ($urandom_range(3) == 0) begin
          @(negedge clk);
          enc_sym_en[l] = 0; dec_rx_valid[l] = 0;
          enc_info_in[l] = 1'($urandom);
        end
        @(negedge clk);
        check(dec_rx_ready[l] && enc_info_req[l] == (t < k) && enc_code_sop[l] == (t == 0) &&
              enc_code_eop[l] == (t == n - 1),
              $sformatf("link %0d blk %0d symbol %0d handshake", l, blk, t));
        enc_sym_en[l]  = 1;
        enc_info_in[l] = (t < k) ? info[k - 1 - t] : 1'($urandom);
        #1;
        sent[n - 1 - t]  = enc_code_out[l];
        dec_rx_valid[l]  = 1;
        dec_rx_bit[l]    = enc_code_out[l] ^ err[n - 1 - t];
      end
      for (int j = 0; j < k; j++) begin
        @(negedge clk);
        enc_sym_en[l] = 0; dec_rx_valid[l] = 0;
        check(dec_out_valid[l] && !dec_rx_ready[l] && dec_out_first[l] == (j == 0) &&
              dec_out_last[l] == (j == k - 1),
              $sformatf("link %0d blk %0d output slot %0d", l, blk, j));
        got[k - 1 - j] = dec_out_bit[l];
        if (j == k - 1) st = dec_status[l];
      end
      check(sent == cw, $sformatf("link %0d blk %0d code word", l, blk));
      check(got == exp.info, $sformatf("link %0d blk %0d kind %0d data", l, blk, kind));
      if (must_restore)
        check(got == info, $sformatf("link %0d blk %0d restored", l, blk));
      check(st.detected == exp.detected && st.corrected == exp.corrected &&
            st.uncorrectable == exp.uncorrectable,
            $sformatf("link %0d blk %0d status", l, blk));
      if (!st.detected) n_clean[l]++;
      if (st.corrected) n_corr[l]++;
      if (st.uncorrectable) n_unc[l]++;
      if (kind == 2 && !must_restore) n_chk[l]++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      run_link(0, 279, 265, 5, 64'h4A25, 30);
      run_link(1, 214, 200, 5, 64'h4A25, 30);
      run_link(2, 35, 27, 3, 64'h16B, 100);
      run_link(3, 23, 15, 3, 64'h16B, 100);
      run_link(4, 7, 4, 1, 64'hB, 150);
    join
    for (int l = 0; l < 5; l++) begin
      $display("link %0d: clean %0d corrected %0d uncorrectable %0d check-only bursts %0d",
               l, n_clean[l], n_corr[l], n_unc[l], n_chk[l]);
      checks += 4;
      if (n_clean[l] == 0) failures++;
      if (n_corr[l] == 0) failures++;
      if (n_unc[l] == 0) failures++;
      if (n_chk[l] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 300000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
