// ext_image_rom: behavioural model of the external image memory read by the processor.
//
// A synchronous-read ROM of N*N pixels: data shows the pixel at the address presented with
// rd one clock earlier. Its contents are a pseudo-random image drawn at time zero from
// $urandom with the given seed, plus an optional smooth ramp so that the low band carries
// structure. The testbench reads the same contents through pixel() for its reference model.
module ext_image_rom #(
  parameter int unsigned N     = 32,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned SEED  = 1,
  parameter int unsigned STYLE = 0     // 0: random, 1: ramp + noise, 2: extremes 0/255
) (
  input  logic                       clk,
  input  logic                       rd,
  input  logic [$clog2(N*N)-1:0]     addr,
  output logic [PIX_W-1:0]           data
);
  logic [PIX_W-1:0] mem [N*N];

  initial begin
    int unsigned s;
    s = $urandom(SEED);
    for (int i = 0; i < N * N; i++) begin
      int r, c, v;
      r = i / N; c = i % N;
      case (STYLE)
        0: v = $urandom % (2**PIX_W);
        1: v = (r * 5 + c * 3) % 200 + $urandom % 40;
        default: v = ($urandom % 2) ? 2**PIX_W - 1 : 0;
      endcase
      mem[i] = PIX_W'(v);
    end
  end

  always_ff @(posedge clk)
    if (rd) data <= mem[addr];

  function automatic int pixel(int i);
    return int'(mem[i]);
  endfunction
endmodule
