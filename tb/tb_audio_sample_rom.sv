// tb_audio_sample_rom: reads the default memory at sound boundaries and
// random addresses and checks each word, one clock after its address,
// against the test-tone rule (triangle of period 16 + 4k between -8192 and
// +8192 for sound k); also checks the tone's extremes.
module tb_audio_sample_rom;
  logic               clk = 0;
  logic [14:0]        addr = 0;
  logic signed [15:0] data;
  int checks = 0, failures = 0;

  audio_sample_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int i);
    int k, n, p, ph, v;
    k = i / 2048; n = i % 2048; p = 16 + 4 * k;
    ph = n % p;
    v = (ph < p / 2) ? ph : p - ph;
    return (v * 32768) / p - 8192;
  endfunction

  initial begin
    int mn = 0, mx = 0;
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = (i < 64) ? (i % 16) * 2048 + i / 16 : $urandom_range(0, 32767);
      addr = 15'(a);
      @(posedge clk); #1;
      checks++;
      if (int'(data) != expected(a)) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %0d expected %0d", a, data, expected(a));
      end
      if (int'(data) < mn) mn = int'(data);
      if (int'(data) > mx) mx = int'(data);
    end
    checks++;
    if (mn != -8192 || mx != 8192) begin
      failures++;
      $display("FAIL range %0d..%0d", mn, mx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
