3de38e3980000000
3dd72c243c9670de
3db640f43d1c9440
3d86b7cd3d6ad22a
3d1699783d92dd83
3b4e24ba3d9e8ea7
bd052f273d9140e2
bd868f5d3d4c4a1e
bdb9cbd63c6a96f6
bdd3692cbd065b18
bdd6484dbdb19af7
bddd6978be0d54ee
bdf734d4be1c3c05
bdc82fb7be04c546
bd57b1ebbdeb67d8
bc33751dbdd78525
3cc783a1bdc0fa67
3d5f1baebda6601f
3da4401cbd8b57bf
3dcc1922bd69a5c9
3ddd4b8cbd3ca0ff
3ddaec51bce44e20
3dd1cc72bb0fde11
3dc3aabe3ce06c19
3dab0e7f3d71cc77
3d7df0233dbb2838
3cc144d93df78c8e
bd302c033e0a0152
be0ea1ca3dbba5e1
be32a4ebbd7e5b7b
bcf9d1dfbe285a80
3dbf0c8abdc59361
3de578083be1430d
3d7fc62d3da356e4
bc97a58d3dc0dcb1
bda3950d3d3d9310
bdb24c5cbcc1679e
bd604f60bd998569
bc5157e2bdd1fa57
3c8b4d43bded09a7
3cdfb86fbddc2f40
3d22a56ebda51f23
3d642b7dbd5942d0
3d909ebbbcddae85
3dafde29bb320971
3dd286113c4b40c8
3dcfd6423c662034
3da2fc033cf3c446
3d5509323d66fc9e
3bf757063da89025
bd9cfcf93d969348
bddf1b07bd824001
3ca6092abdc21d0c
3d886b7cbd05a96b
3d8704633c9c1a0a
3d412bde3d7fe13d
3c8528e33de87a89
3ccafff33e532fea
3d99db193e19c456
3bc4106a3de1a88c
bd6afe263d96aec9
bdbc7b193b0debae
bd51b56bbda3d0e1
3d3fd599bda635c1
3db6142c3afb7f81
3d2f2a893d972c94
bd19a1aa3d998105
bda9e3253c6bbb5e
bd8f523abd613477
bcb87d64bdd2a2ca
3cf5fe76be13f4cd
3c6b2047be411c3d
bb4b35e5be04b6db
3ccb7eb6bdb37233
3d489dc1bd7c36a9
3d8d016ebd2bdf59
3db0c6e0bcf635e5
3dc054b8bce31ae3
3db43b43bca8b325
3da9ab9cbb9a903e
3daa3d353c4a33a8
3db44c133cc85ab2
3db6f6283cdd4f0a
3da264073cfae753
3d88c86e3d2fd73d
3d6cbf473d7de30d
3d7326dd3db2a5f2
3dad2c1b3dc79e78
3dadc0693d95e46a
3d73d3273d8f679b
3d1367293dac061c
3c8b59513defbb15
3d73e3d53e3cdab7
3dedd2743dbf903c
3d8117103d864d33
3cec96a63d8b057f
3a8feead3d9b4f6e
bcd5ce383dbec07b
bd0592c53e0752c0
3a17d5b83e03239f
bc3da4e83dcac62a
bd2680e73dafcc4e
bda4d5f43db13e16
bdec20763e10cbd7
bd13cb9a3e12b535
bd27fe403da6752b
bd774f113d1f9a61
bd8da1c7bbf364df
bd3ad1cfbd80eaa0
3d0f7520bda5ea18
3dadf4fcbba5396c
3d4536a43d6f6786
bbba9b113d9868a8
bd68a6343d8b8c8b
bdee67633d864ac6
be01f3af3df81f71
bda2c4cf3d9f26e5
bd9c43763cb52d91
bd860544bce17561
bcd4dd8ebd90d327
3d5c7d62bd8eb891
3db87a363cdf38cd
3c0b199b3da8fbed
bd6a8f6c3d35388a
bd8a9c00bc9fcf0b
bcd0180cbd96e633
3d82f734bd8e2c9f
3dc86bd93d352015
bc2237c33dcac5b4
bda48d993d0a7092
bd9055f3bd34964d
bbfc641cbdb5bc5f
3da75243bd8bf9eb
3e01bdef3d493b78
3a6aff1a3e25c6b4
be174da93d8480d1
be01399bbda3a5be
bceb7ad6be0e79b8
3d7f8d32bdfca2be
3dea4d2abd830a3c
3df0d7363c16f26d
3d9f04203d8bcd90
3c4e948c3dba5f4e
bd4d0ac23d8bbfef
bda5259f3c21da85
bd778127bd5cdc0f
3b356407bdaa530d
3d8e9f3dbd57a4c8
3db7e5863cb71510
3d3004893db46cbb
bd1ab34f3dc3d07a
bdc4ff393d356dc5
bdd27179bcda26e1
bd86ef27bda1464e
bc28ffc4bdc43036
3d2acbadbda30a90
3d9b7691bd23d2ca
3dadbb173c367aad
3d866c213d7a9bea
3ca478ea3dc53150
bd2edc2f3dd070ef
bdd181ea3d8a7357
be05d896b96940de
bde21557bd98808f
bd4e15b9bdfde5b7
3cc91885be0c4cf4
3dc1e754bdfe4324
3e16126bbde35c50
3e148a89bdd1f300
3deb4a54bd6606a7
3dbdc050bba76488
3d8b78a23d0a1d85
3d18f99e3d75ec57
3a07d2fd3d98a6e6
bd2ab16c3da0dc32
bdb19eb63d9f254f
bdecd06b3da168c2
bde8edd43d5d37ac
bdd601283b87471b
bda626d2bd431041
bd0f16d5bdafc138
3cee6dc0bdbe6271
3db4e44dbd6b9f55
3de50b773c140b88
3db028153d93e960
3cdbb2793dce6296
bd11d97c3db06c1c
bd9af7db3d1c39f4
bd9ee859bccaa524
bd0b2aa9bd9e06b2
3d42433dbda5f0f3
3ddcb76e3b8ad1a3
3d1580fe3ddf7530
bdaa6bdc3d8bbae1
bdb4e7dbbd232811
bc1ca9ecbdbb1607
3d99cb44bd663cac
3dbde7ce3d2bc1bc
3b163f723de7ca6a
bde927593d4c45c6
bdbd838fbdc24894
3d78de17bdf7c6cc
3e0135393c8cb877
3cf0cd9c3dd90276
bd8576073d88dc54
bda78cf7bc42eaea
bd25e270bd883324
3cbbafd6bd9765c4
3d9345ddbd08ca47
3d99765f3cfe6c8a
3cf10c573d9a8bb8
bcf882413d9614d3
bd8fd62b3d107432
bda5521fbc84234c
bd885a30bd8dcf19
bd0d0f90be062f8c
bd0d3a28be85a973
be45872abe1ee6d9
bdb20cbebdbf5a5c
bcded382bdb49b8c
3c77edc6bda7682d
3d4d6170bd916d7d
3da0aa15bd6ab86b
3dc0fe71bd19fb26
3dc45bcabb2a8e7a
3da38c553d4030a0
3ccd65943dc06b92
bd8fc5ab3d9a64fd
bdb8fe6ebce51213
bca1bb14bd9dedad
3d346520bd6a67f5
3d9ac16dbb481953
3d6cb5743d953c55
bd708c503de0f930
bdfe1d2abd102957
bcb2590ebdd3e206
3d5b7bbfbda52a6c
3dc9929abd299452
3e090a7dbc2a8b7d
3e12ed12bbcbd726
3decd0563c622751
3db1ca4c3d49636a
3d62b3843dad557a
3c93585c3df3c326
bc6cf7f93e18bae5
bd115a513e0f2d0b
bd901e833db684ad
bdb9891e3cab7823
bd8ca78cbd3add20
bc0092c9bda05aaf
3d770bf7bd61a462
3dbacb153cc78b74
3c84edaf3df2f1e5
be02bca73d0fcbe5
bd49ab57bdbef373
3d417ba5bd8d2bf8
3d9d89d980000000
3d417ba53d8d2bf8
bd49ab573dbef373
be02bca7bd0fcbe5
3c84edafbdf2f1e5
3dbacb15bcc78b74
3d770bf73d61a462
bc0092c93da05aaf
bd8ca78c3d3add20
bdb9891ebcab7823
bd901e83bdb684ad
bd115a51be0f2d0b
bc6cf7f9be18bae5
3c93585cbdf3c326
3d62b384bdad557a
3db1ca4cbd49636a
3decd056bc622751
3e12ed123bcbd726
3e090a7d3c2a8b7d
3dc9929a3d299452
3d5b7bbf3da52a6c
bcb2590e3dd3e206
bdfe1d2a3d102957
bd708c50bde0f930
3d6cb574bd953c55
3d9ac16d3b481953
3d3465203d6a67f5
bca1bb143d9dedad
bdb8fe6e3ce51213
bd8fc5abbd9a64fd
3ccd6594bdc06b92
3da38c55bd4030a0
3dc45bca3b2a8e7a
3dc0fe713d19fb26
3da0aa153d6ab86b
3d4d61703d916d7d
3c77edc63da7682d
bcded3823db49b8c
bdb20cbe3dbf5a5c
be45872a3e1ee6d9
bd0d3a283e85a973
bd0d0f903e062f8c
bd885a303d8dcf19
bda5521f3c84234c
bd8fd62bbd107432
bcf88241bd9614d3
3cf10c57bd9a8bb8
3d99765fbcfe6c8a
3d9345dd3d08ca47
3cbbafd63d9765c4
bd25e2703d883324
bda78cf73c42eaea
bd857607bd88dc54
3cf0cd9cbdd90276
3e013539bc8cb877
3d78de173df7c6cc
bdbd838f3dc24894
bde92759bd4c45c6
3b163f72bde7ca6a
3dbde7cebd2bc1bc
3d99cb443d663cac
bc1ca9ec3dbb1607
bdb4e7db3d232811
bdaa6bdcbd8bbae1
3d1580febddf7530
3ddcb76ebb8ad1a3
3d42433d3da5f0f3
bd0b2aa93d9e06b2
bd9ee8593ccaa524
bd9af7dbbd1c39f4
bd11d97cbdb06c1c
3cdbb279bdce6296
3db02815bd93e960
3de50b77bc140b88
3db4e44d3d6b9f55
3cee6dc03dbe6271
bd0f16d53dafc138
bda626d23d431041
bdd60128bb87471b
bde8edd4bd5d37ac
bdecd06bbda168c2
bdb19eb6bd9f254f
bd2ab16cbda0dc32
3a07d2fdbd98a6e6
3d18f99ebd75ec57
3d8b78a2bd0a1d85
3dbdc0503ba76488
3deb4a543d6606a7
3e148a893dd1f300
3e16126b3de35c50
3dc1e7543dfe4324
3cc918853e0c4cf4
bd4e15b93dfde5b7
bde215573d98808f
be05d896396940de
bdd181eabd8a7357
bd2edc2fbdd070ef
3ca478eabdc53150
3d866c21bd7a9bea
3dadbb17bc367aad
3d9b76913d23d2ca
3d2acbad3da30a90
bc28ffc43dc43036
bd86ef273da1464e
bdd271793cda26e1
bdc4ff39bd356dc5
bd1ab34fbdc3d07a
3d300489bdb46cbb
3db7e586bcb71510
3d8e9f3d3d57a4c8
3b3564073daa530d
bd7781273d5cdc0f
bda5259fbc21da85
bd4d0ac2bd8bbfef
3c4e948cbdba5f4e
3d9f0420bd8bcd90
3df0d736bc16f26d
3dea4d2a3d830a3c
3d7f8d323dfca2be
bceb7ad63e0e79b8
be01399b3da3a5be
be174da9bd8480d1
3a6aff1abe25c6b4
3e01bdefbd493b78
3da752433d8bf9eb
bbfc641c3db5bc5f
bd9055f33d34964d
bda48d99bd0a7092
bc2237c3bdcac5b4
3dc86bd9bd352015
3d82f7343d8e2c9f
bcd0180c3d96e633
bd8a9c003c9fcf0b
bd6a8f6cbd35388a
3c0b199bbda8fbed
3db87a36bcdf38cd
3d5c7d623d8eb891
bcd4dd8e3d90d327
bd8605443ce17561
bd9c4376bcb52d91
bda2c4cfbd9f26e5
be01f3afbdf81f71
bdee6763bd864ac6
bd68a634bd8b8c8b
bbba9b11bd9868a8
3d4536a4bd6f6786
3dadf4fc3ba5396c
3d0f75203da5ea18
bd3ad1cf3d80eaa0
bd8da1c73bf364df
bd774f11bd1f9a61
bd27fe40bda6752b
bd13cb9abe12b535
bdec2076be10cbd7
bda4d5f4bdb13e16
bd2680e7bdafcc4e
bc3da4e8bdcac62a
3a17d5b8be03239f
bd0592c5be0752c0
bcd5ce38bdbec07b
3a8feeadbd9b4f6e
3cec96a6bd8b057f
3d811710bd864d33
3dedd274bdbf903c
3d73e3d5be3cdab7
3c8b5951bdefbb15
3d136729bdac061c
3d73d327bd8f679b
3dadc069bd95e46a
3dad2c1bbdc79e78
3d7326ddbdb2a5f2
3d6cbf47bd7de30d
3d88c86ebd2fd73d
3da26407bcfae753
3db6f628bcdd4f0a
3db44c13bcc85ab2
3daa3d35bc4a33a8
3da9ab9c3b9a903e
3db43b433ca8b325
3dc054b83ce31ae3
3db0c6e03cf635e5
3d8d016e3d2bdf59
3d489dc13d7c36a9
3ccb7eb63db37233
bb4b35e53e04b6db
3c6b20473e411c3d
3cf5fe763e13f4cd
bcb87d643dd2a2ca
bd8f523a3d613477
bda9e325bc6bbb5e
bd19a1aabd998105
3d2f2a89bd972c94
3db6142cbafb7f81
3d3fd5993da635c1
bd51b56b3da3d0e1
bdbc7b19bb0debae
bd6afe26bd96aec9
3bc4106abde1a88c
3d99db19be19c456
3ccafff3be532fea
3c8528e3bde87a89
3d412bdebd7fe13d
3d870463bc9c1a0a
3d886b7c3d05a96b
3ca6092a3dc21d0c
bddf1b073d824001
bd9cfcf9bd969348
3bf75706bda89025
3d550932bd66fc9e
3da2fc03bcf3c446
3dcfd642bc662034
3dd28611bc4b40c8
3dafde293b320971
3d909ebb3cddae85
3d642b7d3d5942d0
3d22a56e3da51f23
3cdfb86f3ddc2f40
3c8b4d433ded09a7
bc5157e23dd1fa57
bd604f603d998569
bdb24c5c3cc1679e
bda3950dbd3d9310
bc97a58dbdc0dcb1
3d7fc62dbda356e4
3de57808bbe1430d
3dbf0c8a3dc59361
bcf9d1df3e285a80
be32a4eb3d7e5b7b
be0ea1cabdbba5e1
bd302c03be0a0152
3cc144d9bdf78c8e
3d7df023bdbb2838
3dab0e7fbd71cc77
3dc3aabebce06c19
3dd1cc723b0fde11
3ddaec513ce44e20
3ddd4b8c3d3ca0ff
3dcc19223d69a5c9
3da4401c3d8b57bf
3d5f1bae3da6601f
3cc783a13dc0fa67
bc33751d3dd78525
bd57b1eb3deb67d8
bdc82fb73e04c546
bdf734d43e1c3c05
bddd69783e0d54ee
bdd6484d3db19af7
bdd3692c3d065b18
bdb9cbd6bc6a96f6
bd868f5dbd4c4a1e
bd052f27bd9140e2
3b4e24babd9e8ea7
3d169978bd92dd83
3d86b7cdbd6ad22a
3db640f4bd1c9440
3dd72c24bc9670de
