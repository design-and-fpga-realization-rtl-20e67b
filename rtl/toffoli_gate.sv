// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// Function: zi = xi, zj = xj, zk = (xi & xj) ^ xk. The two controls pass
// through and the target is inverted only when both controls are 1, so the
// gate is its own inverse.
//
// Structure: four 2-input cells and no inverter. One AND2 forms the
// control product t = xi & xj; the XOR with the target then uses the same
// inverter-free three-cell form as the Feynman gate,
// zk = NAND(t, xk) & OR(t, xk). The 4-cell, 0-inverter count follows the
// published low-power design; the exact arrangement of the cells is this
// design's choice, since only the counts are given.
//
// Interface: single-bit inputs xi, xj, xk and outputs zi, zj, zk.
// The pass-through outputs zi and zj are plain wires from xi and xj; that is
// what the reversible gate defines, not a missing function.
// Timing: purely combinational, no clock and no reset.
module toffoli_gate (
    input  logic xi,
    input  logic xj,
    input  logic xk,
    output logic zi,
    output logic zj,
    output logic zk
);

    logic and_ij;   // cell 1: AND2, control product
    logic nand_tk;  // cell 2: NAND2
    logic or_tk;    // cell 3: OR2

    assign and_ij  = xi & xj;
    assign nand_tk = ~(and_ij & xk);
    assign or_tk   = and_ij | xk;

    assign zi = xi;
    assign zj = xj;
    assign zk = nand_tk & or_tk;  // cell 4: AND2

endmodule
