// new_gate_tb: exhaustive self-checking test of the New Gate.
//
// Applies all eight input patterns, one per clock of a testbench-only clock,
// and compares (zi, zj, zk) with the gate's truth table, worked out by hand
// from zi = xi, zj = xi xj ^ xk, zk = xi' xk' ^ xj' and written out as a
// constant. It also checks that the eight output patterns are all different
// (reversibility) and that with xk = 0 the gate yields the full-adder terms
// zj = xi & xj and zk = xi ^ xj.
// A watchdog ends the run with a failure if it has not finished in 100 cycles.
module new_gate_tb;

    logic clk = 1'b0;
    always #5 clk = ~clk;

    int checks   = 0;
    int failures = 0;

    logic xi, xj, xk;
    logic zi, zj, zk;

    new_gate dut (.xi(xi), .xj(xj), .xk(xk), .zi(zi), .zj(zj), .zk(zk));

    // index {xi, xj, xk} -> {zi, zj, zk}
    localparam logic [2:0] EXPECT [8] = '{3'b000, 3'b011, 3'b001, 3'b010,
                                          3'b101, 3'b111, 3'b110, 3'b100};

    task automatic check(input bit cond, input string what);
        checks++;
        if (!cond) begin
            failures++;
            $display("FAIL: %s (x=%0b%0b%0b z=%0b%0b%0b)", what, xi, xj, xk, zi, zj, zk);
        end
    endtask

    initial begin
        bit [7:0] seen;
        seen = '0;
        for (int v = 0; v < 8; v++) begin
            @(negedge clk);
            {xi, xj, xk} = 3'(v);
            #1;
            check({zi, zj, zk} == EXPECT[v], "truth table");
            check(!seen[{zi, zj, zk}], "output pattern unique");
            seen[{zi, zj, zk}] = 1'b1;
            if (xk == 1'b0) begin
                check(zj == (xi && xj), "generate term with xk=0");
                check(zk == (xi != xj), "propagate term with xk=0");
            end
        end
        check(seen == 8'hFF, "all output patterns reached");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        repeat (100) @(posedge clk);
        failures++;
        $display("FAIL: watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

endmodule
