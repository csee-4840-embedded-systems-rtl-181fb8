// bin2bcd: sequential binary to decimal converter for the score display.
//
// Software writes the scores as plain 32-bit integers; the number sprites need
// one decimal digit each. Whenever the input differs from the value last
// converted, the converter latches it and runs the shift-and-add-3 (double
// dabble) algorithm, one input bit per clock: before each shift every BCD
// digit of 5 or more gets 3 added. After WIDTH clocks the result register
// `bcd` (DIGITS digits, least significant in bits [3:0]) is updated at once,
// so the display never shows a half-converted number. Latency from a change
// of `bin` to a new `bcd`: WIDTH + 2 clocks. `busy` is high meanwhile.
//
// The conversion in hardware is this design's choice; the design states only
// that a 32-bit score is sent and shown with digit sprites.
module bin2bcd #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned DIGITS = 10,    // enough for 2**32 - 1
  localparam int unsigned CW    = $clog2(WIDTH + 1)
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic [WIDTH-1:0]      bin,
  output logic [4*DIGITS-1:0]   bcd,
  output logic                  busy
);

  logic [WIDTH-1:0]    src;        // value being (or last) converted
  logic [WIDTH-1:0]    shreg;
  logic [4*DIGITS-1:0] acc, acc_adj;
  logic [CW-1:0]       count;

  always_comb begin
    acc_adj = acc;
    for (int d = 0; d < DIGITS; d++)
      if (acc[4*d +: 4] >= 4'd5)
        acc_adj[4*d +: 4] = acc[4*d +: 4] + 4'd3;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      src   <= '0;
      shreg <= '0;
      acc   <= '0;
      count <= '0;
      bcd   <= '0;
      busy  <= 1'b0;
    end else if (!busy) begin
      if (bin != src) begin
        src   <= bin;
        shreg <= bin;
        acc   <= '0;
        count <= '0;
        busy  <= 1'b1;
      end
    end else if (count == CW'(WIDTH)) begin
      bcd  <= acc;
      busy <= 1'b0;
    end else begin
      {acc, shreg} <= {acc_adj[4*DIGITS-2:0], shreg, 1'b0};
      count        <= count + CW'(1);
    end
  end

endmodule
