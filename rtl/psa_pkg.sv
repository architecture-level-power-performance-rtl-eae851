// psa_pkg: the pipeline stage algorithm (PSA), evaluated while the design is
// elaborated, and the stage data it works on.
//
// The adder's data-flow graph is cut into ten candidate stages. For each stage
// i the array below holds T[i], the delay of its critical element, and O[i],
// the number of bits that would have to be registered at its lower boundary.
// Boundary 0 (the input register) always exists. For boundary i = 1..10:
//
//   I[i] = ( sum_{k<i} T[k] * prod_{m=k..i-1} P[m]  + T[i] + T[i+1] ) / C
//          -> 1 if above 1, else 0   (merging stage i+1 would break timing)
//   W[i] = O[i+1] / O[i] -> 1 if above PHI, else 0   (next cut is wider)
//   P[i] = |I[i]-1| * |W[i]-1|        (1: the register at i is removed)
//
// The sum is the delay already accumulated in front of stage i by boundaries
// that were removed. Stage 11 is the result integrator: it has the delay of
// that element and no outputs to register (O = 0), so the last boundary is
// removed whenever timing allows.
//
// The delays and output counts are those of the reference 90 nm
// implementation; they steer where registers go, they are not a timing model
// of this RTL. Using the integrator delay and O = 0 for the eleventh entry is
// this design's reading of how the last boundary is treated.
package psa_pkg;

  localparam int NSTAGES = 10;

  // Critical-path delay of stages 1..10 and of the result integrator (ps).
  localparam int unsigned T_PS [1:NSTAGES+1] =
    '{900, 1300, 1200, 1500, 1400, 1400, 1100, 1100, 700, 1000, 900};

  // Potential registered outputs at boundaries 1..10, then 0 after stage 11.
  localparam int unsigned OUTPUTS [1:NSTAGES+1] =
    '{78, 82, 109, 157, 178, 146, 131, 114, 106, 112, 0};

  // Returns the kept boundaries: bit 0 is the input register, bit i the
  // register after stage i.
  function automatic logic [NSTAGES:0] psa_keep(input int unsigned clk_ps,
                                                input real phi);
    logic [NSTAGES:0] keep;
    logic             p [1:NSTAGES];
    int unsigned      acc;
    logic             run;
    logic             i_flag, w_flag;
    keep = '0;
    keep[0] = 1'b1;
    for (int i = 1; i <= NSTAGES; i++) begin
      acc = 0;
      for (int k = 1; k < i; k++) begin
        run = 1'b1;
        for (int m = k; m < i; m++) run &= p[m];
        if (run) acc += T_PS[k];
      end
      acc += T_PS[i] + T_PS[i+1];
      i_flag = (acc > clk_ps);
      w_flag = (real'(OUTPUTS[i+1]) / real'(OUTPUTS[i])) > phi;
      p[i] = !i_flag && !w_flag;
      keep[i] = !p[i];
    end
    return keep;
  endfunction

  // Largest useful PHI: widest cut over narrowest cut. A sweep of PHI from 1
  // up to this value covers every placement the algorithm can produce.
  function automatic real phi_max();
    int unsigned lo, hi;
    lo = OUTPUTS[1];
    hi = OUTPUTS[1];
    for (int i = 2; i <= NSTAGES; i++) begin
      if (OUTPUTS[i] < lo) lo = OUTPUTS[i];
      if (OUTPUTS[i] > hi) hi = OUTPUTS[i];
    end
    return real'(hi) / real'(lo);
  endfunction

  // Number of registers in a keep vector (the adder's latency in cycles).
  function automatic int unsigned stage_count(input logic [NSTAGES:0] keep);
    int unsigned n;
    n = 0;
    for (int i = 0; i <= NSTAGES; i++) n += int'(keep[i]);
    return n;
  endfunction

  // Register bits of a keep vector, counted with the OUTPUTS table
  // (the input register not included).
  function automatic int unsigned register_bits(input logic [NSTAGES:0] keep);
    int unsigned n;
    n = 0;
    for (int i = 1; i <= NSTAGES; i++) if (keep[i]) n += OUTPUTS[i];
    return n;
  endfunction

endpackage
