// addr_engine: dynamic address recovery and downstream routing of one board.
//
// Address register: the 32-bit address {fc, offset, 28-bit address}. A board that sees
// its GPS and reference-clock inputs (is_mfo) is the master: offset 000, address 0, valid.
// Any other board copies the address field of each good 1PPS packet from its uplink; an
// offset of 000 there means "invalid": the register is cleared, the internal-addressing
// flag ia goes low and addr_err pulses. Loss of the uplink also clears the register and ia.
// ia low blocks all upstream transmission (see flow_ctrl).
//
// Downstream address strings: the 1PPS packet on port p carries offset+1 and the address
// with the nibble of the new offset set to p (offset 1 -> bits 27..24, ... 7 -> bits 3..0,
// the document's table). A board whose own address is invalid, or that is already at
// offset 7, sends offset 000, which invalidates everything below it.
//
// Routing of a downstream packet q (combinational): the nibbles of the levels above this
// board must match its own address; then offset equal -> absorb, offset greater ->
// forward to the port in the nibble of level offset+1 (a slave has no ports: error),
// offset smaller, prefix mismatch or invalid own address -> error.
//
// The flow-control bit (fc) of every port_addr word is a constant 0: flow control travels
// in data packets, not in 1PPS address strings, so those 16 output bits never change.
module addr_engine
  import timing_pkg::*;
#(
  parameter int NP       = NPORTS,  // downstream ports
  parameter bit IS_SLAVE = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        is_mfo,
  input  logic        up_los,
  input  logic        pps_valid,     // good 1PPS packet from the uplink
  input  addr_t       pps_addr,      // its address field
  output addr_t       own,
  output logic        ia,            // internal addressing flag (address valid)
  output logic        addr_err,      // invalid address received
  output addr_t [NP-1:0] port_addr,  // address string for each port's 1PPS packet
  input  addr_t       q,             // routing query
  output logic        r_absorb,
  output logic        r_forward,
  output logic [3:0]  r_port,
  output logic        r_error
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own <= '0; ia <= 1'b0; addr_err <= 1'b0;
    end else begin
      addr_err <= 1'b0;
      if (is_mfo) begin
        own <= '0; ia <= 1'b1;
      end else if (up_los) begin
        own <= '0; ia <= 1'b0;
      end else if (pps_valid) begin
        if (pps_addr.offset == 3'd0) begin
          own <= '0; ia <= 1'b0; addr_err <= 1'b1;
        end else begin
          own <= '{fc: 1'b0, offset: pps_addr.offset, addr: pps_addr.addr};
          ia  <= 1'b1;
        end
      end
    end
  end

  logic can_extend;
  assign can_extend = ia && own.offset != 3'd7;

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      if (can_extend)
        port_addr[p] = '{fc: 1'b0, offset: own.offset + 3'd1,
                         addr: set_nibble(own.addr, own.offset + 3'd1, 4'(p))};
      else
        port_addr[p] = '0;
    end
  end

  logic prefix_ok;
  always_comb begin
    prefix_ok = 1'b1;
    for (int k = 1; k <= 7; k++)
      if (3'(k) <= own.offset && addr_nibble(q.addr, 3'(k)) != addr_nibble(own.addr, 3'(k)))
        prefix_ok = 1'b0;
    r_absorb  = ia && prefix_ok && q.offset == own.offset;
    r_forward = ia && prefix_ok && q.offset > own.offset && !IS_SLAVE;
    r_port    = addr_nibble(q.addr, own.offset + 3'd1);
    r_error   = !r_absorb && !r_forward;
  end
endmodule
