// rev_full_adder: one-bit full adder built only from reversible gates
// (New Gate, Toffoli gate, Feynman gate) in their inverter-free form.
//
// Dataflow:
//   NG(a, b, 0)             -> zi = a (garbage), zj = a&b, zk = a^b
//   TG(a^b, cin, a&b)       -> zi = a^b, zj = cin, zk = (a^b)&cin ^ a&b = cout
//   FG(a^b, cin)            -> zi = a^b (garbage), zj = a^b^cin = sum
// The New Gate with its third input held at the constant 0 produces the
// generate (a&b) and propagate (a^b) terms. The Toffoli gate folds the
// carry-in into the generate term to give the carry-out; its two pass-through
// outputs feed the Feynman gate, which adds the carry-in to the propagate term
// to give the sum. Generate and propagate-and-carry are never both 1, so the
// XOR in the Toffoli gate acts as the OR of the usual carry equation.
//
// The gate chain, the constant-0 input and which output carries sum, carry
// and garbage follow the published adder. Bringing the two garbage outputs
// out as a port is this design's choice: with them, (sum, cout, garbage) is a
// bijective image of (a, b, cin) and the inputs can be recovered as
// a = garbage[0], b = garbage[0]^garbage[1], cin = sum^garbage[1].
// Synthesis may prune the garbage logic if the port is left open.
//
// On the reference FPGA board the inputs sit on slide switches and sum and
// cout drive LEDs; the pin assignment belongs in a constraints file.
//
// Interface: single-bit a, b, cin in; sum, cout and garbage[1:0] out.
// garbage[0] is the New Gate's pass-through output and so a plain wire from a.
// Timing: purely combinational, no clock and no reset. Critical path is
// NG.zk -> TG.zk (cout) and NG.zk -> TG.zi -> FG.zj (sum).
module rev_full_adder (
    input  logic       a,
    input  logic       b,
    input  logic       cin,
    output logic       sum,
    output logic       cout,
    output logic [1:0] garbage
);

    // New Gate outputs
    logic ng_zi;  // = a, garbage
    logic ng_zj;  // = a & b
    logic ng_zk;  // = a ^ b
    // Toffoli gate outputs
    logic tg_zi;  // = a ^ b
    logic tg_zj;  // = cin
    // Feynman gate outputs
    logic fg_zi;  // = a ^ b, garbage

    new_gate u_ng (
        .xi(a),
        .xj(b),
        .xk(1'b0),
        .zi(ng_zi),
        .zj(ng_zj),
        .zk(ng_zk)
    );

    toffoli_gate u_tg (
        .xi(ng_zk),
        .xj(cin),
        .xk(ng_zj),
        .zi(tg_zi),
        .zj(tg_zj),
        .zk(cout)
    );

    feynman_gate u_fg (
        .xi(tg_zi),
        .xj(tg_zj),
        .zi(fg_zi),
        .zj(sum)
    );

    assign garbage = {fg_zi, ng_zi};

endmodule
