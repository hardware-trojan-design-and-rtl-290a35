// tb_po_pkg: bookkeeping for the proof-obligation testbench. Each monitored
// gate reports every rising edge of its output under its hierarchical name;
// po1 records edges seen while only NULL/DATA inputs were applied, po2 all
// edges. Monitoring starts when 'armed' is set (after reset has settled).
package tb_po_pkg;

  bit armed       = 1'b0;
  bit legal_phase = 1'b1;
  bit po1 [string];
  bit po2 [string];

  function automatic void hit(input string name);
    if (!armed) return;
    po2[name] = 1'b1;
    if (legal_phase) po1[name] = 1'b1;
  endfunction

endpackage
