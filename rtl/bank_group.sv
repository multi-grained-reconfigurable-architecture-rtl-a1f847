// bank_group: memory-sharing interconnect of one PE group.
//
// GROUP_ROWS PEs of the same column (four in the original design, the depth of
// the smallest BNN kernel) share one input bank and one output bank. In any
// valid configuration at most one PE of the group is an input PE and at most
// one is an output PE, so the group needs no arbitration:
//   - input side (demultiplexer): the word read from the input bank is offered
//     to every PE of the group, and its valid flag reaches only PEs whose RD
//     bit is set;
//   - output side (multiplexer): the valid result of the output-mode PE is
//     forwarded to the output bank write port.
// Should two PEs offer a result in the same cycle (a configuration error) the
// lower-numbered one is written and 'conflict' is raised; this flag is this
// design's addition.
//
// Purely combinational.
module bank_group #(
  parameter int NW         = mugra_pkg::NW,
  parameter int GROUP_ROWS = 4
) (
  // input bank side
  input  logic [NW-1:0]                  bank_rdata,
  input  logic                           bank_rvalid,
  // PE side
  input  logic [GROUP_ROWS-1:0]          pe_rd,
  output logic [GROUP_ROWS-1:0][NW-1:0]  pe_ib_data,
  output logic [GROUP_ROWS-1:0]          pe_ib_valid,
  input  logic [GROUP_ROWS-1:0][NW-1:0]  pe_ob_data,
  input  logic [GROUP_ROWS-1:0]          pe_ob_valid,
  // output bank side
  output logic [NW-1:0]                  bank_wdata,
  output logic                           bank_we,
  output logic                           conflict
);

  always_comb begin
    for (int i = 0; i < GROUP_ROWS; i++) begin
      pe_ib_data[i]  = bank_rdata;
      pe_ib_valid[i] = bank_rvalid && pe_rd[i];
    end
  end

  always_comb begin
    bank_we    = 1'b0;
    bank_wdata = '0;
    conflict   = 1'b0;
    for (int i = GROUP_ROWS - 1; i >= 0; i--) begin
      if (pe_ob_valid[i]) begin
        if (bank_we) conflict = 1'b1;
        bank_we    = 1'b1;
        bank_wdata = pe_ob_data[i];
      end
    end
  end

endmodule
