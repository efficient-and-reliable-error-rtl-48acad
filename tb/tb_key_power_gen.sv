// tb_key_power_gen: at the default size (Q = 64) checks every entry K^0..K^Q
// of the power table against repeated bit-serial multiplication, checks that
// done pulses exactly Q clocks after the start clock, and that a second key
// replaces the table.
module tb_key_power_gen;
  import tes_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned Q = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst_n, start, busy, ready, done;
  blk_t key;
  blk_t pow [Q+1];

  key_power_gen #(.Q(Q)) dut (.clk(clk), .rst_n(rst_n), .start(start), .key(key),
                              .busy(busy), .ready(ready), .done(done), .pow(pow));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; key = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      int cyc;
      blk_t e;
      @(negedge clk);
      key = rand128();
      start = 1'b1;
      @(posedge clk);      // start clock
      #1 start = 1'b0;
      cyc = 0;
      while (!done) begin
        @(posedge clk); #1;
        cyc++;
      end
      checks++;
      if (cyc != Q) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if (!ready) begin failures++; $display("FAIL ready"); end
      e = 128'd1;
      for (int i = 0; i <= Q; i++) begin
        checks++;
        if (pow[i] !== e) begin failures++; $display("FAIL pow[%0d]", i); end
        e = ref_mul(e, key);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
