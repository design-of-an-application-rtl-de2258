// asip_asm_pkg: instruction encoders for the FIR ASIP testbenches.
//
// Each function returns the 32-bit word of one instruction, built field by
// field from the instruction format (independently of the RTL decoder), and
// fir_program() assembles the FIR dot-product program used by the
// end-to-end tests.
package asip_asm_pkg;

  function automatic logic [31:0] i_nop();
    return 32'h0000_0000;
  endfunction

  function automatic logic [31:0] i_alu(input int fn, input int d, input int s1, input int s2);
    return {6'b000000, 5'(s1), 5'(s2), 5'(d), 5'b0, 6'(fn)};
  endfunction

  function automatic logic [31:0] i_add(input int d, input int s1, input int s2);
    return i_alu(1, d, s1, s2);
  endfunction

  function automatic logic [31:0] i_mul(input int d, input int s1, input int s2);
    return i_alu(6, d, s1, s2);
  endfunction

  function automatic logic [31:0] i_incr(input int r);
    return {6'b000000, 5'(r), 5'b0, 5'b0, 5'b0, 6'b000110};
  endfunction

  function automatic logic [31:0] i_ldr(input int d, input int s1, input int s2);
    return {6'b100100, 5'(s1), 5'(s2), 5'(d), 11'b0};
  endfunction

  function automatic logic [31:0] i_ldm(input int addr, input int value);
    return {4'b1101, 12'(addr), 16'(value)};
  endfunction

  function automatic logic [31:0] i_mvm(input int base, input int ofs, input int src);
    return {6'b100011, 5'(src), 5'(base), 4'b0, 12'(ofs)};
  endfunction

  function automatic logic [31:0] i_jne(input int d, input int s, input int target);
    return {6'b111000, 5'(s), 5'(d), 16'(target)};
  endfunction

  function automatic logic [31:0] i_movi(input int d, input int value);
    return {6'b100001, 5'b0, 5'(d), 4'b0, 12'(value)};
  endfunction

  // Data-memory layout of the FIR program
  localparam int N_ADDR    = 'h0a;  // number of taps
  localparam int COEF_BASE = 'h10;  // A[0..N-1]
  localparam int SAMP_BASE = 'h1a;  // X[0..N-1]
  localparam int OUT_BASE  = 'h2a;  // running sums Y[0..N-1]

  typedef logic [31:0] prog_t [$];

  // FIR dot product: for i in 0..N-1: r2 += A[i]*X[i]; Y[i] = r2.
  // Register use: r0 loop index, r1 tap count, r2 accumulator, r3/r5 bases,
  // r4/r6 operands, r8 element index, r10 output index.
  // Returns the program; loop_pc is the address of the loop head.
  function automatic prog_t fir_program(input int n, input int a[], input int x[],
                                        output int loop_pc);
    prog_t p;
    p.push_back(i_ldm(N_ADDR, n));
    for (int i = 0; i < n; i++) p.push_back(i_ldm(COEF_BASE + i, a[i]));
    for (int i = 0; i < n; i++) p.push_back(i_ldm(SAMP_BASE + i, x[i]));
    p.push_back(i_movi(10, 0));
    p.push_back(i_movi(0, 0));
    p.push_back(i_movi(8, 0));
    p.push_back(i_movi(2, N_ADDR));
    p.push_back(i_ldr(1, 2, 0));          // r1 = DM[r2 + r0] = N
    p.push_back(i_movi(2, 0));
    p.push_back(i_movi(3, COEF_BASE));
    p.push_back(i_movi(5, SAMP_BASE));
    loop_pc = p.size();
    p.push_back(i_ldr(4, 3, 8));          // r4 = A[i]
    p.push_back(i_ldr(6, 5, 8));          // r6 = X[i]
    p.push_back(i_mul(4, 4, 6));          // needs r6 from the previous load
    p.push_back(i_add(2, 2, 4));
    p.push_back(i_mvm(10, OUT_BASE, 2));  // Y[i] = r2
    p.push_back(i_incr(10));
    p.push_back(i_incr(8));
    p.push_back(i_incr(0));
    p.push_back(i_jne(0, 1, loop_pc));    // two delay slots follow
    p.push_back(i_nop());
    p.push_back(i_nop());
    return p;
  endfunction

endpackage
