// new_gate: 3x3 reversible "New Gate" (NG).
//
// Function:
//   zi = xi
//   zj = (xi & xj) ^ xk
//   zk = (~xi & ~xk) ^ ~xj
// Every output pattern occurs for exactly one input pattern, so the gate is
// reversible. With xk tied to 0 it yields zj = xi & xj and
// zk = ~xi ^ ~xj = xi ^ xj, the generate and propagate terms of a full adder.
//
// Structure: eight 2-input cells and no inverter, so every complemented
// literal is absorbed into an inverting cell.
//   zj: t = AND(xi, xj); zj = NAND(t, xk) & OR(t, xk)       (4 cells)
//   zk: u = NOR(xi, xk) = ~xi & ~xk;
//       zk = u ^ ~xj = XNOR(u, xj) = AND(u, xj) | NOR(u, xj) (4 cells)
// The 8-cell, 0-inverter count follows the published low-power design; the
// arrangement of the cells is this design's reading of those counts.
//
// Interface: single-bit inputs xi, xj, xk and outputs zi, zj, zk.
// The pass-through output zi is a plain wire from xi; that is what the
// reversible gate defines, not a missing function.
// Timing: purely combinational, no clock and no reset.
module new_gate (
    input  logic xi,
    input  logic xj,
    input  logic xk,
    output logic zi,
    output logic zj,
    output logic zk
);

    // zj = xi xj ^ xk
    logic and_ij;    // cell 1: AND2
    logic nand_tk;   // cell 2: NAND2
    logic or_tk;     // cell 3: OR2
    // zk = xi' xk' ^ xj'
    logic nor_ik;    // cell 5: NOR2
    logic and_uj;    // cell 6: AND2
    logic nor_uj;    // cell 7: NOR2

    assign and_ij  = xi & xj;
    assign nand_tk = ~(and_ij & xk);
    assign or_tk   = and_ij | xk;

    assign nor_ik  = ~(xi | xk);
    assign and_uj  = nor_ik & xj;
    assign nor_uj  = ~(nor_ik | xj);

    assign zi = xi;
    assign zj = nand_tk & or_tk;   // cell 4: AND2
    assign zk = and_uj | nor_uj;   // cell 8: OR2

endmodule
