// Line shift register (SR): delays a raster-scan sample stream by LEN enabled
// clock cycles. An SR of M2-1 stages together with one z^-1 makes the
// vertical delay z1^-1 = z^-M2 of an image M2 pixels wide.
//
// How it works: the first LEN-1 stages are a circular buffer in a memory of
// LEN-1 words with one pointer; the last stage is an output register. On an
// enabled edge the oldest word (at the pointer) moves into the output
// register and the new sample takes its place, so every word spends exactly
// LEN enabled edges in the structure, the same as a chain of LEN flip-flops.
// A fill counter stands in for clearing the memory: until LEN-1 samples have
// been written since reset the oldest word is not yet valid, and zero is
// moved to the output instead. The memory itself is never read before it is
// written, so it needs no reset. LEN = 1 is a single register.
//
// Interface: d enters on every clock edge with en=1; q is the sample that
// entered LEN enabled edges earlier (registered output), zero while fewer
// than LEN samples have entered since rst_n. With en=0 nothing moves.
// Behaviour follows the document's shift register; the memory-plus-counter
// realisation (instead of LEN flip-flops) and the reset are this design's
// choices, taken so a line of hundreds of samples maps onto a RAM.
module sf_sr #(
  parameter int LEN = 255,
  parameter int W   = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);
  localparam int D  = (LEN > 1) ? LEN - 1 : 1;   // memory depth
  localparam int PW = (D > 1) ? $clog2(D + 1) : 1;

  if (LEN > 1) begin : g_mem
    logic signed [W-1:0] mem [D];
    logic [PW-1:0]       ptr;
    logic [PW-1:0]       fill;

    always_ff @(posedge clk) begin
      if (en) mem[ptr] <= d;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ptr  <= '0;
        fill <= '0;
        q    <= '0;
      end else if (en) begin
        q   <= (fill == PW'(D)) ? mem[ptr] : '0;
        ptr <= (ptr == PW'(D - 1)) ? '0 : ptr + 1'b1;
        if (fill != PW'(D)) fill <= fill + 1'b1;
      end
    end
  end else begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q <= '0;
      else if (en) q <= d;
    end
  end

  initial begin
    assert (LEN >= 1) else $error("sf_sr: LEN must be at least 1");
  end
endmodule
