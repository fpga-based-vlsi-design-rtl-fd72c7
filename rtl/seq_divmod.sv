// seq_divmod: sequential unsigned divider (restoring, one quotient bit per
// clock). It is the "mod n" step of every modular operation in the design.
//
// The dividend is shifted in most significant bit first. Each cycle the
// partial remainder is doubled, the next dividend bit is appended, and the
// divisor is subtracted when it fits; the comparison result is the next
// quotient bit. After NW cycles quo holds dividend / divisor and rem holds
// dividend mod divisor.
//
// Interface: start (one-cycle pulse, while idle) captures dividend and
// divisor; busy is high while dividing; done pulses for one cycle when quo
// and rem are valid. They stay valid until the next start. Latency: done
// follows start by NW + 1 cycles. A zero divisor gives quo = all ones and
// rem = dividend mod 2^DW (the plain outcome of the restoring steps).
//
// The document only says that a reduction mod n is needed; the restoring
// algorithm is this design's choice.
module seq_divmod #(
  parameter int unsigned NW = 64,   // dividend and quotient width
  parameter int unsigned DW = 32    // divisor and remainder width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quo,
  output logic [DW-1:0] rem
);
  localparam int unsigned CNT_W = $clog2(NW + 1);

  logic [NW-1:0]    shreg;   // dividend bits not yet consumed, then quotient
  logic [DW:0]      prem;    // partial remainder, one guard bit
  logic [DW-1:0]    dvs;
  logic [CNT_W-1:0] cnt;

  logic [DW:0] trial;
  logic [DW:0] diff;
  logic        fits;

  always_comb begin
    trial = {prem[DW-1:0], shreg[NW-1]};
    diff  = trial - {1'b0, dvs};
    fits  = (trial >= {1'b0, dvs});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      shreg <= '0;
      prem  <= '0;
      dvs   <= '0;
      cnt   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        shreg <= dividend;
        prem  <= '0;
        dvs   <= divisor;
        cnt   <= CNT_W'(NW);
      end else if (busy) begin
        prem  <= fits ? diff : trial;
        shreg <= {shreg[NW-2:0], fits};
        cnt   <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quo = shreg;
  assign rem = prem[DW-1:0];
endmodule
