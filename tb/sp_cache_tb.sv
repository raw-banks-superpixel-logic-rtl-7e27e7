// sp_cache_tb -- the SP cache against a queue model.
//
// Random writes and reads, with phases that fill the buffer to the top and
// drain it, are compared entry by entry with a SystemVerilog queue; the test
// also checks the full/empty handshakes and the occupancy count.
module sp_cache_tb;
  import sp_pkg::*;

  localparam int unsigned DEPTH = 16;
  logic         clk = 0, rst_n = 0;
  logic         wr_valid, wr_ready, rd_valid, rd_ready;
  cache_entry_t wr_entry, rd_entry;
  logic [$clog2(DEPTH):0] level;
  cache_entry_t model [$];
  int checks = 0, failures = 0, fulls = 0;

  sp_cache #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_entry = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int wp;
      logic dr, dw;
      @(negedge clk);
      wp = ((cyc / 200) % 2 == 0) ? 80 : 20;  // alternate filling and draining
      wr_valid = $urandom_range(0, 99) < wp;
      rd_ready = $urandom_range(0, 99) < (100 - wp);
      wr_entry = cache_entry_t'({$urandom, $urandom});
      #1;
      checks++;
      if (level != model.size() || wr_ready != (model.size() < DEPTH) ||
          rd_valid != (model.size() > 0)) begin
        failures++;
        $display("cycle %0d: level %0d ready %0b valid %0b, model %0d", cyc, level, wr_ready,
                 rd_valid, model.size());
      end
      if (!wr_ready) fulls++;
      if (rd_valid && rd_ready) begin
        checks++;
        if (rd_entry != model[0]) begin
          failures++;
          $display("cycle %0d: read %h expected %h", cyc, rd_entry, model[0]);
        end
      end
      dr = rd_valid && rd_ready;
      dw = wr_valid && wr_ready;
      @(posedge clk);
      if (dr) void'(model.pop_front());
      if (dw) model.push_back(wr_entry);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("the cache never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
