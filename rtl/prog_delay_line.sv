// prog_delay_line: behavioural model of a programmable fine-delay line.
//
// This is a behavioural model of an analog delay element, not synthesizable
// logic. The PDG delays each of its output bundles by up to about 200 ns in
// 50 ps steps (12-bit code) and the Fan-out by up to about 20 ns in 2.5 ns
// steps (3-bit code); both are sub-cycle delays made by delay-line parts.
//
// Every bit of `d` is copied to `q` after code x STEP_PS picoseconds with
// transport semantics (every edge is kept, up to NSLOT edges in flight), so
// all signals of a bundle see the same delay. A code change affects edges
// that arrive after it. Insertion delay of the real part is not modelled.
// The model keeps its own 1 ps time unit, so delays are whole picoseconds.
// Ranges and step sizes follow the PDG and Fan-out DLY fields.
// Synthesis ignores the delays and maps the timer slots to latches; they
// stand for the delay part and are not logic to build.
`timescale 1ps/1ps
module prog_delay_line #(
  parameter int unsigned WIDTH   = 3,
  parameter int unsigned CW      = 12,
  parameter int unsigned STEP_PS = 50,
  parameter int unsigned NSLOT   = 64   // input changes that may be in flight at once
) (
  input  logic [CW-1:0]    code,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  int unsigned dly_ps;
  assign dly_ps = int'(code) * STEP_PS;

  // Each input change is handed, round robin, to one of NSLOT timer slots,
  // which copies the captured value to q after the delay. This keeps every
  // edge even when many are in flight (transport delay).
  logic [WIDTH-1:0] val  [NSLOT];
  int unsigned      tdel [NSLOT];
  logic [NSLOT-1:0] go;
  int unsigned      wr;

  initial begin
    q  = '0;
    go = '0;
    wr = 0;
  end

  // A zero delay is a plain copy: a zero-length wait would resume after the
  // logic that reads q has already settled.
  always @(d) begin
    if (dly_ps == 0) begin
      q = d;
    end else begin
      val[wr]  = d;
      tdel[wr] = dly_ps;
      go[wr]   = ~go[wr];
      wr       = (wr + 1) % NSLOT;
    end
  end

  for (genvar s = 0; s < int'(NSLOT); s++) begin : g_slot
    always @(go[s]) begin
      #(tdel[s]) q = val[s];
    end
  end
endmodule
