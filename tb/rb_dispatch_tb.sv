// rb_dispatch_tb -- routing of raw-bank words by their HINT bit.
//
// Random words, last flags and cache readiness are applied; the testbench
// checks that HINT = 0 words go to the isolated path without waiting, HINT = 1
// words go to the cache and wait for it, and the last word of a bank always
// leaves a cache entry with eoe set (with the SP only when HINT = 1).
module rb_dispatch_tb;
  import sp_pkg::*;

  logic         in_valid, in_ready, in_last;
  sp_word_t     in_word;
  logic         isp_valid, cache_valid, cache_ready;
  sp_word_t     isp_sp;
  cache_entry_t cache_entry;
  int checks = 0, failures = 0;

  rb_dispatch dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("mismatch: %s (hint=%0b last=%0b valid=%0b cache_ready=%0b)",
               what, in_word.hint, in_last, in_valid, cache_ready);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic need;
      in_word     = sp_word_t'({$urandom, $urandom});
      in_valid    = $urandom_range(0, 3) != 0;
      in_last     = $urandom_range(0, 4) == 0;
      cache_ready = $urandom_range(0, 2) != 0;
      #1;
      need = in_word.hint || in_last;
      check(in_ready == (need ? cache_ready : 1'b1), "in_ready");
      check(isp_valid == (in_valid && !in_word.hint && (!in_last || cache_ready)), "isp_valid");
      check(cache_valid == (in_valid && need), "cache_valid");
      if (isp_valid) check(isp_sp == in_word, "isp_sp");
      if (cache_valid) begin
        check(cache_entry.eoe == in_last, "eoe");
        check(cache_entry.has_sp == in_word.hint, "has_sp");
        if (in_word.hint) check(cache_entry.sp == in_word, "cache sp");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
