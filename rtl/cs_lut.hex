20088080401001020880401002088040200880401001020410010102084020088040200410010208804010020410010204200420042008401002088040100101
00800802010088010100010011008000200821002004004008401000100084002020008040800108001040081008040001004200400440040100048010020100
40000000020000000008000000080002000000002000000400000000080000000400008000000002000200000000000200002000000400000000200000000001
