// tb_bin2bcd: converts edge values and random 32-bit numbers, checking each
// decimal digit against division by powers of ten, that the result appears
// exactly WIDTH + 2 = 34 clocks after the input changes, and that the old
// result stays on the output while a conversion runs.
module tb_bin2bcd;
  logic        clk = 0, reset = 1;
  logic [31:0] bin = 0;
  logic [39:0] bcd;
  logic        busy;
  int checks = 0, failures = 0;

  bin2bcd dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] ref_bcd(logic [31:0] v);
    longint unsigned n = v;
    logic [39:0] r;
    for (int d = 0; d < 10; d++) begin
      r[4*d +: 4] = 4'(n % 10);
      n = n / 10;
    end
    return r;
  endfunction

  initial begin
    logic [39:0] prev;
    repeat (3) @(posedge clk);
    reset = 0;
    @(posedge clk); #1;
    prev = bcd;
    for (int i = 0; i < 300; i++) begin
      int lat;
      logic [31:0] v;
      v = (i == 0) ? 32'hFFFF_FFFF : (i == 1) ? 32'd1 : (i == 2) ? 32'd999_999_999 : $urandom;
      if (v == bin) v = v + 1;
      bin = v;
      lat = 0;
      do begin
        @(posedge clk); #1;
        lat++;
        if (bcd !== prev && lat < 34) begin
          checks++; failures++;
          $display("FAIL output changed early at %0d", lat);
        end
      end while (bcd === prev && lat < 100);
      checks++;
      if (bcd !== ref_bcd(v)) begin
        failures++;
        $display("FAIL %0d -> %h expected %h", v, bcd, ref_bcd(v));
      end
      checks++;
      if (lat != 34 && ref_bcd(v) !== prev) begin
        failures++;
        $display("FAIL latency %0d expected 34", lat);
      end
      prev = bcd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
